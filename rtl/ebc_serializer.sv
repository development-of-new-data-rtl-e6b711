// ebc_serializer: sends buffered, decoded events to the ROD.
//
// When the Event Length FIFO holds an entry, the serializer pops it and then
// reads exactly that many bytes from the Event Data FIFO, shifting each out
// MSB first, one bit per clock, with no gap between bytes: the ROD expects
// the raw MCC stream without holes. Both FIFOs have registered reads; the
// next byte is requested two bits before the current one ends so it is
// ready in time. The line is 0 between events (the raw MCC idle level); a
// zero length is popped and skipped. Event-by-event release on the length
// entry follows the eBOC decoding unit; the timing is this design's.
module ebc_serializer #(
  parameter int unsigned LEN_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             len_empty,
  input  logic [LEN_W-1:0] len,
  output logic             len_rd,
  input  logic [7:0]       data,
  output logic             data_rd,
  output logic             sout,
  output logic             busy
);
  typedef enum logic [1:0] {S_IDLE, S_LEN, S_FIRST, S_SHIFT} ser_state_e;

  ser_state_e       state;
  logic [LEN_W-1:0] remaining;  // bytes still to be requested
  logic [7:0]       sh;
  logic [2:0]       bitcnt;
  logic             next_ready;

  assign len_rd  = (state == S_IDLE) && !len_empty;
  assign data_rd = ((state == S_LEN) && (len != '0)) ||
                   ((state == S_SHIFT) && (bitcnt == 3'd6) && (remaining != '0));
  assign sout    = (state == S_SHIFT) ? sh[7] : 1'b0;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      remaining  <= '0;
      sh         <= '0;
      bitcnt     <= '0;
      next_ready <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (len_rd) state <= S_LEN;
        S_LEN: begin
          if (len == '0) begin
            state <= S_IDLE;
          end else begin
            remaining <= len - 1'b1;
            state     <= S_FIRST;
          end
        end
        S_FIRST: begin
          sh     <= data;
          bitcnt <= '0;
          state  <= S_SHIFT;
        end
        S_SHIFT: begin
          sh     <= sh << 1;
          bitcnt <= bitcnt + 1'b1;
          if (data_rd) begin
            remaining  <= remaining - 1'b1;
            next_ready <= 1'b1;
          end
          if (bitcnt == 3'd7) begin
            if (next_ready) begin
              sh         <= data;
              next_ready <= 1'b0;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
