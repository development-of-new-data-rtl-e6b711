// fei3_event_emulator: FE-I3 / MCC event generator of the module emulator.
//
// Each Level-1 trigger is stored, with the 4-bit Level-1 ID and the bunch
// crossing ID (BCID) of its arrival, in a trigger buffer. Triggers that find
// the buffer full are counted as skipped and the count goes out with the next
// event. When the buffer is not empty and start_ok is high (the frame builder
// is idle, so events never overlap), one event is sent on raw_out, one bit per
// clock, MSB of each field first:
//
//   LEAD_BITS zeros | 11101 | skipped,L1ID (8) 1 | BCID (8) 1 | 1110,FE (8) 1 |
//   hit_count x [ Row (8) Col (5) ToT (8) 1 ] | 22 zeros
//
// The '1' after each field is the sync bit; a sync bit followed by 22 zeros
// (the trailer) cannot occur inside the data. sending_event is high with the
// first lead bit and falls after the last trailer bit; raw_out is 0 between
// events. The BCID counts every clock and is cleared by bcr; the Level-1 ID
// counts accepted triggers and is cleared by ecr.
//
// Field order and widths follow the MCC data format. Hit contents are this
// design's choice, deterministic so that a checker can predict them: hit i
// has Row = i mod 240, Col = i mod 24, ToT = (7*i + 16*L1ID) mod 256. The
// lead zeros, the buffer depth and the start_ok handshake are also this
// design's choices.
module fei3_event_emulator
  import readout_pkg::*;
#(
  parameter int unsigned LEAD_BITS  = 2,
  parameter int unsigned TRIG_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lv1,
  input  logic       bcr,
  input  logic       ecr,
  input  logic [7:0] hit_count,
  input  logic [3:0] fe_id,
  input  logic       start_ok,
  output logic       raw_out,
  output logic       sending_event
);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_SEND} state_e;
  typedef enum logic [2:0] {F_LEAD, F_HDR, F_L1, F_BC, F_FE, F_HIT, F_TRL} field_e;

  localparam int unsigned SW = 22;  // longest field: one hit with its sync bit

  logic [7:0] bcid;
  logic [3:0] l1id, skipped;
  logic       trig_full, trig_empty, trig_rd;
  trigger_t   trig_in, trig_out, rec;
  logic [$clog2(TRIG_DEPTH+1)-1:0] trig_count;

  state_e     state;
  field_e     field, nf;
  logic [SW-1:0] sh, nf_sh;
  logic [4:0] nleft, nf_n;
  logic       nf_last;  // the current field is the final one
  logic [7:0] hits_total, hits_sent;
  logic [7:0] nxt_row, nxt_tot;
  logic [4:0] nxt_col;

  // ---------------- counters and trigger buffer ----------------
  always_ff @(posedge clk) begin
    if (!rst_n || bcr) bcid <= '0;
    else               bcid <= bcid + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l1id    <= '0;
      skipped <= '0;
    end else begin
      if (ecr) l1id <= '0;
      else if (lv1 && !trig_full) l1id <= l1id + 1'b1;
      if (lv1 && trig_full) begin
        if (skipped != 4'hF) skipped <= skipped + 1'b1;
      end else if (lv1) begin
        skipped <= '0;
      end
    end
  end

  assign trig_in = '{skipped: skipped, l1id: l1id, bcid: bcid};

  sync_fifo #(.WIDTH($bits(trigger_t)), .DEPTH(TRIG_DEPTH)) u_trig (
    .clk, .rst_n,
    .wr_en(lv1 && !trig_full), .din(trig_in),
    .rd_en(trig_rd), .dout(trig_out),
    .full(trig_full), .empty(trig_empty), .count(trig_count)
  );

  assign trig_rd = (state == S_IDLE) && !trig_empty && start_ok;

  // ---------------- next field selection ----------------
  always_comb begin
    nf      = F_TRL;
    nf_last = 1'b0;
    unique case (field)
      F_LEAD:  nf = F_HDR;
      F_HDR:   nf = F_L1;
      F_L1:    nf = F_BC;
      F_BC:    nf = F_FE;
      F_FE:    nf = (hits_total != 0) ? F_HIT : F_TRL;
      F_HIT:   nf = (hits_sent < hits_total) ? F_HIT : F_TRL;
      F_TRL:   nf_last = 1'b1;
      default: nf = F_TRL;
    endcase
  end

  // contents of a field, left-aligned in the shift register
  function automatic logic [SW+4:0] field_bits(input field_e f, input trigger_t r,
                                               input logic [3:0] fe, input logic [7:0] row,
                                               input logic [4:0] col, input logic [7:0] tot);
    logic [SW-1:0] b;
    logic [4:0]    n;
    b = '0;
    n = 5'd1;
    unique case (f)
      F_LEAD: begin b = '0;                                      n = 5'(LEAD_BITS); end
      F_HDR:  begin b = {MCC_HEADER, 17'b0};                     n = 5'd5;  end
      F_L1:   begin b = {r.skipped, r.l1id, 1'b1, 13'b0};        n = 5'd9;  end
      F_BC:   begin b = {r.bcid, 1'b1, 13'b0};                   n = 5'd9;  end
      F_FE:   begin b = {FE_PREFIX, fe, 1'b1, 13'b0};            n = 5'd9;  end
      F_HIT:  begin b = {row, col, tot, 1'b1};                   n = 5'd22; end
      F_TRL:  begin b = '0;                                      n = 5'(TRAILER_ZEROS); end
      default: begin b = '0;                                     n = 5'd1;  end
    endcase
    return {b, n};
  endfunction

  assign {nf_sh, nf_n} = field_bits(nf, rec, fe_id, nxt_row, nxt_col, nxt_tot);

  // ---------------- event sequencer ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      field         <= F_LEAD;
      sh            <= '0;
      nleft         <= '0;
      rec           <= '0;
      hits_total    <= '0;
      hits_sent     <= '0;
      nxt_row       <= '0;
      nxt_col       <= '0;
      nxt_tot       <= '0;
      raw_out       <= 1'b0;
      sending_event <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          raw_out       <= 1'b0;
          sending_event <= 1'b0;
          if (trig_rd) state <= S_FETCH;
        end
        S_FETCH: begin
          rec        <= trig_out;
          hits_total <= hit_count;
          hits_sent  <= '0;
          nxt_row    <= '0;
          nxt_col    <= '0;
          nxt_tot    <= {trig_out.l1id, 4'b0};
          if (LEAD_BITS > 0) begin
            field <= F_LEAD;
            sh    <= '0;
            nleft <= 5'(LEAD_BITS);
          end else begin
            field <= F_HDR;
            sh    <= {MCC_HEADER, 17'b0};
            nleft <= 5'd5;
          end
          state <= S_SEND;
        end
        S_SEND: begin
          raw_out       <= sh[SW-1];
          sending_event <= 1'b1;
          if (nleft == 5'd1) begin
            if (nf_last) begin
              state <= S_IDLE;
            end else begin
              field <= nf;
              sh    <= nf_sh;
              nleft <= nf_n;
              if (nf == F_HIT) begin
                hits_sent <= hits_sent + 1'b1;
                nxt_row   <= (nxt_row == 8'(N_ROWS - 1)) ? '0 : nxt_row + 1'b1;
                nxt_col   <= (nxt_col == 5'(N_COLS - 1)) ? '0 : nxt_col + 1'b1;
                nxt_tot   <= nxt_tot + 8'd7;
              end
            end
          end else begin
            sh    <= sh << 1;
            nleft <= nleft - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
