// readout_chain_top: laboratory read-out chain with 8b10b data transmission.
//
// An emulated FE-I3 pixel module (mcc_emulator) and the back-of-crate card
// (eboc) with its 8b10b decoding unit, as they sit in the test crate. The
// links between them run in reality through an add-on board, a patch panel
// and cables that only pass signals on; they are therefore ports here:
//   mod_cmd   : eBOC command outputs toward the modules (emulator DTI is one)
//   mod_data  : module data inputs of the eBOC
//   emu_dti   : command input of the emulator
//   emu_dto0  : emulator 8b10b encoded data (connect to mod_data[DEC_CH])
//   emu_dto1  : emulator raw data            (connect to a plain channel)
// The ROD side is rod_cmd (commands in) and rod_data (data out). The ROD then
// sees the raw event on one channel and the decoded copy, delayed, on DEC_CH,
// and the disparity debug pulses on DBG_CH. Everything runs on the single
// 40 MHz clock of the eBOC oscillator.
module readout_chain_top #(
  parameter int unsigned N_CH   = 32,
  parameter int unsigned DEC_CH = 0,
  parameter int unsigned DBG_CH = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  // ROD side
  input  logic [N_CH-1:0] rod_cmd,
  output logic [N_CH-1:0] rod_data,
  // eBOC module side (patch panel)
  output logic [N_CH-1:0] mod_cmd,
  input  logic [N_CH-1:0] mod_data,
  // emulator module side (add-on board)
  input  logic            emu_dti,
  output logic            emu_dto0,
  output logic            emu_dto1,
  // emulator controls
  input  logic            emu_bcr,
  input  logic            emu_ecr,
  input  logic            emu_hit_step,
  input  logic [3:0]      emu_fe_id,
  output logic [7:0]      emu_hit_count,
  output logic            emu_fifo_overflow,
  // eBOC status
  output logic            dec_overflow,
  output logic            dec_debug
);
  mcc_emulator u_emu (
    .clk, .rst_n, .dti(emu_dti), .bcr(emu_bcr), .ecr(emu_ecr),
    .hit_step(emu_hit_step), .fe_id(emu_fe_id),
    .dto0(emu_dto0), .dto1(emu_dto1), .hit_count(emu_hit_count),
    .fifo_overflow(emu_fifo_overflow)
  );

  eboc #(.N_CH(N_CH), .DEC_CH(DEC_CH), .DBG_CH(DBG_CH)) u_eboc (
    .clk, .rst_n, .rod_cmd, .mod_cmd, .mod_data, .rod_data,
    .overflow(dec_overflow), .debug(dec_debug)
  );
endmodule
