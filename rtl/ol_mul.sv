// ol_mul: radix-2 floating-point on-line multiplier.
//
// Operation: z = x * y, formed as the digits of x*y/2 with exponent
// ex + ey + 1 (the zero marker if either operand carries it).  With each digit pair the partial operands
// X[j] and Y[j] grow by one digit, and the residual recurrence
//     W[j] = 2 (W[j-1] - z[j-1]) + (x[j+3] Y[j-1] + y[j+3] X[j]) / 16
// produces one product digit per step after three steps of look-ahead.  The
// digit is chosen from an estimate of W truncated to two fractional bits:
// z = 1 if est >= 1/2, -1 if est < -1/2, else 0, which keeps |W - z| <= 1/2.
// W itself is kept exactly (M+4 fractional bits), so no precision is lost.
// Halving the product keeps |W| <= 9/8; without it a product near 1 would
// push the residual out of range in the first steps.  Raw digits pass
// through post-normalization with at most three merges (digits z1..z5
// examined), enough to bring any product of quasi-normalized operands back
// to [1/4,1).
//
// Timing: operands x and y in lock-step; the first product digit leaves
// 5 cycles after the first operand digit, one more per merge (on-line
// delay 5..8; the document quotes 5..7 with the product unhalved).  Exactly M output digits are produced; the
// unit feeds itself zero digits after the operands end.  A new operation may
// start the cycle after the last output digit.
// From the document: the recurrence, the 3-step look-ahead, the 3-bit
// selection and post-normalization.  This design's choices: the halving of
// the product (and the fourth merge it needs), the valid/stall handling and
// the zero marker.
module ol_mul
  import ol_pkg::*;
#(
  parameter int unsigned M = OL_M
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  x,
  input  ol_t  y,
  output ol_t  z,
  output logic busy
);

  localparam int unsigned F  = M + 4;   // fractional bits of X, Y and W
  localparam int unsigned WW = F + 4;
  localparam int unsigned KW = $clog2(M + 2);

  typedef logic signed [WW-1:0] fx_t;

  logic          run;
  logic [KW-1:0] kin;
  fx_t           xq, yq, r_q, wt_q;       // X[j-1], Y[j-1], W-z, 2^-k
  logic signed [3:0] jq;                  // step index j, saturates at 1
  logic          first, step, stop;
  digit_t        xc, yc, zs;
  fx_t           xn, yn, xo, yo, w, wt, est;

  function automatic fx_t dig_w(input digit_t g, input fx_t v);
    return (g == 2'sd1) ? v : (g == -2'sd1) ? -v : fx_t'(0);
  endfunction
  logic          rv;
  digit_t        rd;
  exp_t          e_raw;

  always_comb begin
    first = !run && x.v;
    step  = first || (run && ((kin < KW'(M)) ? x.v : 1'b1));
    xc    = (run && kin >= KW'(M)) ? 2'sd0 : x.d;
    yc    = (run && kin >= KW'(M)) ? 2'sd0 : y.d;
    wt    = first ? (fx_t'(1) <<< (F - 1)) : wt_q;
    xo    = first ? fx_t'(0) : xq;
    yo    = first ? fx_t'(0) : yq;
    xn    = xo + dig_w(xc, wt);
    yn    = yo + dig_w(yc, wt);
    w     = ((first ? fx_t'(0) : r_q) <<< 1) + ((dig_w(xc, yo) + dig_w(yc, xn)) >>> 4);
    est   = w >>> (F - 2);                // floor(4 W)
    if (first || jq < 1)     zs = 2'sd0;
    else if (est >= 2)       zs = 2'sd1;
    else if (est < -2)       zs = -2'sd1;
    else                     zs = 2'sd0;
    if (x.e == ZERO_EXP || y.e == ZERO_EXP) e_raw = ZERO_EXP;
    else                                    e_raw = sat_exp(16'(x.e) + 16'(y.e) + 16'sd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      kin  <= '0;
      xq   <= '0;
      yq   <= '0;
      r_q  <= '0;
      wt_q <= '0;
      jq   <= '0;
      rv   <= 1'b0;
      rd   <= '0;
    end else begin
      rv <= 1'b0;
      if (stop) begin
        run <= 1'b0;
      end else if (step) begin
        run  <= 1'b1;
        kin  <= first ? KW'(1) : ((kin < KW'(M)) ? kin + 1'b1 : kin);
        xq   <= xn;
        yq   <= yn;
        wt_q <= wt >>> 1;
        r_q  <= w - (fx_t'(zs) <<< F);
        jq   <= first ? -4'sd1 : ((jq < 1) ? jq + 4'sd1 : jq);
        rv   <= !first && (jq >= 1);
        rd   <= zs;
      end
    end
  end

  ol_postnorm #(.M(M), .MAXSHIFT(3), .ZERO_OUT(1'b0)) u_pn (
    .clk, .rst_n,
    .start  (first),
    .e_raw  (e_raw),
    .rv     (rv && run),
    .rd     (rd),
    .z      (z),
    .done   (stop),
    .shifted()
  );

  assign busy = run;

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) x.v == y.v);
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (run && kin >= KW'(M)) |-> !x.v);

endmodule
