// ol_sqrt: radix-2 floating-point on-line square root, s = sqrt(x), x > 0.
//
// Exponent: if ex is odd the radicand is r = x/2, if even r = x/4, and
// es = floor(ex/2) + 1, so that r in [1/16,1/2) and the root is always
// quasi-normalized (no post-normalization is needed).
// Digit recurrence, three steps of look-ahead on r:
//     v    = 2 W[j-1] + r[j+3]/8
//     W[j] = v - s[j] (2 S[j-1] + s[j] 2^-j),   S[j] = S[j-1] + s[j] 2^-j
// so that W[j] = 2^j (r - S[j]^2) over the digits seen.  The digit s[j] in
// {-1,0,1} is the one that leaves the smallest |W[j]|; residuals are exact
// (M+6 fractional bits).
//
// Timing: the first root digit leaves 4 cycles after the first radicand
// digit (on-line delay 4), the rest one per cycle; M output digits.  After
// the radicand's M digits zero digits are fed.  A new operation may start
// the cycle after the last output digit.
// From the document: the exponent rule, the radicand scaling, the residual
// recurrence and the on-line delay of 4.  The digit selection function is
// not given there; the minimum-residual rule is this design's own, as are the
// output register that sets the delay to 4 and the zero marker.
module ol_sqrt
  import ol_pkg::*;
#(
  parameter int unsigned M = OL_M
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  x,
  output ol_t  s,
  output logic busy
);

  localparam int unsigned F  = M + 6;
  localparam int unsigned WW = F + 5;
  localparam int unsigned KW = $clog2(M + 4);

  typedef logic signed [WW-1:0] fx_t;

  logic          run;
  logic [KW-1:0] kin;                     // radicand digits consumed
  logic [KW-1:0] nout;                    // root digits produced
  digit_t        hx;                      // previous radicand digit
  logic          odd_q, zero_q;
  exp_t          es_q;
  fx_t           wq, yq, wtq;             // W[j-1], S[j-1], 2^-j
  logic signed [2:0] jq;

  logic   first, step, odd, done_raw;
  digit_t xc, rdig, sel;
  fx_t    v, wp, wm, ap, am, a0;

  function automatic fx_t absf(input fx_t a);
    return (a < 0) ? -a : a;
  endfunction

  always_comb begin
    first = !run && x.v;
    step  = first || (run && ((kin < KW'(M)) ? x.v : 1'b1));
    xc    = (run && kin >= KW'(M)) ? 2'sd0 : x.d;
    odd   = first ? x.e[0] : odd_q;
    // r[k+1] = x[k] (odd exponent) or x[k-1] (even exponent)
    rdig  = odd ? xc : (first ? 2'sd0 : hx);
    v     = ((first ? fx_t'(0) : wq) <<< 1)
          + ((rdig == 2'sd1) ? (fx_t'(1) <<< (F - 3)) : (rdig == -2'sd1) ? -(fx_t'(1) <<< (F - 3)) : fx_t'(0));
    wp    = v - ((yq <<< 1) + wtq);
    wm    = v + ((yq <<< 1) - wtq);
    a0    = absf(v);
    ap    = absf(wp);
    am    = absf(wm);
    if (first || jq < 1)         sel = 2'sd0;
    else if (ap < a0 && ap <= am) sel = 2'sd1;
    else if (am < a0)            sel = -2'sd1;
    else                         sel = 2'sd0;
  end

  // output register pair: raw digit, then output stage (delay 4 overall)
  logic   rv, ov, rz, oz;
  digit_t rd, od;
  exp_t   re, oe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      kin    <= '0;
      nout   <= '0;
      hx     <= '0;
      odd_q  <= 1'b0;
      zero_q <= 1'b0;
      es_q   <= '0;
      wq     <= '0;
      yq     <= '0;
      wtq    <= '0;
      jq     <= '0;
      rv     <= 1'b0;
      rd     <= '0;
      re     <= '0;
      rz     <= 1'b0;
    end else begin
      rv <= 1'b0;
      if (step) begin
        run <= 1'b1;
        kin <= first ? KW'(1) : ((kin < KW'(M)) ? kin + 1'b1 : kin);
        hx  <= xc;
        if (first) begin
          odd_q  <= x.e[0];
          zero_q <= (x.e == ZERO_EXP);
          es_q   <= (x.e == ZERO_EXP) ? ZERO_EXP : exp_t'((x.e >>> 1) + 8'sd1);
          nout   <= '0;
          yq     <= '0;
          wtq    <= fx_t'(1) <<< (F - 1);
          jq     <= 3'sd0;           // this step is j = -1, the next j = 0
          wq     <= v;
        end else begin
          if (jq < 1) begin
            jq <= jq + 3'sd1;
            wq <= v;
          end else begin
            wq   <= (sel == 2'sd1) ? wp : (sel == -2'sd1) ? wm : v;
            yq   <= yq + ((sel == 2'sd1) ? wtq : (sel == -2'sd1) ? -wtq : fx_t'(0));
            wtq  <= wtq >>> 1;
            nout <= nout + 1'b1;
            rv   <= 1'b1;
            rd   <= sel;
            re   <= zero_q ? ZERO_EXP : es_q;
            rz   <= zero_q;
          end
        end
      end
      if (done_raw) run <= 1'b0;
    end
  end

  assign done_raw = run && step && !first && (jq >= 1) && (nout == KW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ov <= 1'b0;
      od <= '0;
      oe <= '0;
      oz <= 1'b0;
    end else begin
      ov <= rv;
      od <= rd;
      oe <= re;
      oz <= rz;
    end
  end

  always_comb begin
    s.v = ov;
    s.e = oe;
    s.d = oz ? 2'sd0 : od;
  end

  assign busy = run || rv || ov;

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (run && kin >= KW'(M)) |-> !x.v);

endmodule
