// ol_sign_abs: sign and absolute value of an on-line operand.
// A quasi-normalized operand has a non-zero first digit, so its sign is the
// sign of that digit and is known as soon as the digit arrives.  The
// absolute value is the operand with every digit multiplied by that sign;
// it leaves in the same cycle (no on-line delay).  The sign leaves as the
// on-line operand +1 or -1 (first digit +-1, exponent 1), also in step with
// the input.  A zero first digit counts as positive.  M digits make one
// operand.  The document obtains the sign from the first digit; the rest is
// this design's choice.
module ol_sign_abs
  import ol_pkg::*;
#(
  parameter int unsigned M = OL_M
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  x,
  output ol_t  absx,
  output ol_t  sgnx
);

  logic [$clog2(M)-1:0] idx;
  logic neg_q, neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx   <= '0;
      neg_q <= 1'b0;
    end else if (x.v) begin
      idx <= (idx == ($clog2(M))'(M - 1)) ? '0 : idx + 1'b1;
      if (idx == '0) neg_q <= (x.d == -2'sd1);
    end
  end

  always_comb begin
    neg    = (idx == '0) ? (x.d == -2'sd1) : neg_q;
    absx.v = x.v;
    absx.e = x.e;
    absx.d = neg ? digit_t'(-x.d) : x.d;
    sgnx.v = x.v;
    sgnx.e = exp_t'(1);
    sgnx.d = (idx == '0) ? (neg ? -2'sd1 : 2'sd1) : 2'sd0;
  end

endmodule
