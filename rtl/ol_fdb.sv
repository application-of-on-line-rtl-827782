// ol_fdb: fixed delay buffer.  Delays an on-line operand stream (valid,
// exponent and digit) by DELAY clock cycles, to bring operands that travel
// over paths with a known difference in on-line delay closer in phase
// before they meet.  DELAY = 0 is a plain wire.  A shift register of DELAY
// stages; the document gives the purpose, the structure is the obvious one.
module ol_fdb
  import ol_pkg::*;
#(
  parameter int unsigned DELAY = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  in,
  output ol_t  out
);

  if (DELAY == 0) begin : g_wire
    assign out = in;
  end else begin : g_sr
    ol_t sr [DELAY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DELAY); i++) sr[i] <= OL_IDLE;
      end else begin
        sr[0] <= in;
        for (int i = 1; i < int'(DELAY); i++) sr[i] <= sr[i-1];
      end
    end
    assign out = sr[DELAY-1];
  end

endmodule
