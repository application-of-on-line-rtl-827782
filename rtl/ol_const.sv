// ol_const: a constant held in a register and sent as an on-line operand.
// The constant's digits are released in step with a partner stream (the
// operand it will be combined with), so the two reach the next unit in
// lock-step without a buffer: first digit D1, then zeros, exponent CE; the
// value is D1 * 2^(CE-1).  The defaults give 1 (digits 1,0,0,... exponent 1).
// D1 = 0 with CE = the zero exponent gives the value zero.  M digits make one
// operand; a counter finds the first digit of each.
// The document keeps constants in registers and transmits them when needed;
// the lock-step release is this design's choice.
module ol_const
  import ol_pkg::*;
#(
  parameter int unsigned M  = OL_M,
  parameter exp_t        CE = exp_t'(1),
  parameter digit_t      D1 = 2'sd1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,     // valid of the partner stream
  output ol_t  out
);

  logic [$clog2(M)-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    idx <= '0;
    else if (trig) idx <= (idx == ($clog2(M))'(M - 1)) ? '0 : idx + 1'b1;
  end

  always_comb begin
    out.v = trig;
    out.e = CE;
    out.d = (idx == '0) ? D1 : 2'sd0;
  end

endmodule
