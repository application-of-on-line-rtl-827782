// ol_div: radix-2 floating-point on-line divider, q = n / d.
//
// Initialization: the first four digits of n and d are collected.  The sign
// of the divisor is the sign of its first digit; the divisor is made
// positive (and the quotient digits are negated back on the way out).  If
// the four-digit estimate D[0] of |d| is below 9/16, the divisor is shifted
// one digit left (D' = 2|d|, whose first digit becomes an integer digit;
// the fifth digit is awaited) and the quotient
// exponent is raised by one, so that D' is at least 1/2.  The dividend is
// halved (x = n/2), hence q = x / D' stays below 1 and
//     eq = en - ed + 1 (+1 when the divisor was shifted).
// Quotient generation, with four steps of look-ahead:
//     v    = 2 W[j-1] + x[j+4]/16 - Q[j-1] d'[j+4]/16
//     q[j] = 1 if 2v >= D[j+4],  -1 if 2v < -D[j+4],  else 0
//     W[j] = v - q[j] D[j+4],     Q[j] = Q[j-1] + q[j] 2^-j
// which keeps |W| <= D/2.  Residuals are exact (M+8 fractional bits).  Raw
// digits pass through post-normalization with one merge at most (digits
// q1..q3 examined).
//
// Timing: n and d in lock-step.  The first quotient digit leaves 6 cycles
// after the first operand digit, 7 when the divisor is shifted or one merge
// is needed, 8 when both.  M output digits; zero digits are fed after the
// operands end; a new operation may start after the last output digit.
// From the document: the exponent rule, the divisor shift on D[0] < 1/2, the
// four-digit initialization and post-normalization.  This design's own:
// the comparison of 2v with the running divisor instead of the document's
// constant thresholds (-1/4, 3/16) on a 6-bit estimate, the shift threshold
// 9/16 that guarantees D' >= 1/2, and the handling of a negative divisor,
// on which the document is silent.
module ol_div
  import ol_pkg::*;
#(
  parameter int unsigned M = OL_M
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  n,     // dividend
  input  ol_t  d,     // divisor
  output ol_t  q,
  output logic busy
);

  localparam int unsigned F  = M + 8;
  localparam int unsigned WW = F + 5;
  localparam int unsigned KW = $clog2(M + 2);

  typedef logic signed [WW-1:0] fx_t;

  logic          run;
  logic [KW-1:0] kin;
  digit_t        hn [4];                  // hn[i] = digit of n i+1 steps ago
  digit_t        hd [4];
  logic          inited, shift_q, neg_q;
  fx_t           dq, wq, qq, wtd_q, wtq_q;
  exp_t          eq_q;

  logic   first, step, stop, init_now, decide_now, sh, ng, ngc;
  digit_t nc, dc, xdig, dpd, qs;
  fx_t    dnew, v, wnew, d0;
  logic signed [5:0] val16;
  logic   rv;
  digit_t rd;

  function automatic fx_t dig_w(input digit_t g, input fx_t w);
    return (g == 2'sd1) ? w : (g == -2'sd1) ? -w : fx_t'(0);
  endfunction

  always_comb begin
    first = !run && n.v;
    step  = first || (run && ((kin < KW'(M)) ? n.v : 1'b1));
    nc    = (run && kin >= KW'(M)) ? 2'sd0 : n.d;
    dc    = (run && kin >= KW'(M)) ? 2'sd0 : d.d;

    // decision at the 4th digit: sign and shift of the divisor
    ng    = (hd[2] == -2'sd1);                 // d1
    val16 = 6'(8 * hd[2]) + 6'(4 * hd[1]) + 6'(2 * hd[0]) + 6'(dc);
    if (ng) val16 = -val16;
    sh    = (val16 <= 6'sd8);
    decide_now = run && step && (kin == KW'(3));
    // initialization happens at digit 4 (no shift) or digit 5 (shift)
    init_now = run && step && !inited &&
               ((kin == KW'(3) && !sh) || (kin == KW'(4) && shift_q));

    // divisor digits made positive
    dpd = (decide_now ? ng : neg_q) ? digit_t'(-dc) : dc;

    // initial values: D[0] = d1/2 + .. + d4/16, or 2 D = d1 + d2/2 + .. + d5/16
    ngc = decide_now ? ng : neg_q;
    d0  = fx_t'(0);
    if (shift_q) begin
      d0 = d0 + dig_w(ngc ? digit_t'(-hd[3]) : hd[3], fx_t'(1) <<< F);
      d0 = d0 + dig_w(ngc ? digit_t'(-hd[2]) : hd[2], fx_t'(1) <<< (F - 1));
      d0 = d0 + dig_w(ngc ? digit_t'(-hd[1]) : hd[1], fx_t'(1) <<< (F - 2));
      d0 = d0 + dig_w(ngc ? digit_t'(-hd[0]) : hd[0], fx_t'(1) <<< (F - 3));
    end else begin
      d0 = d0 + dig_w(ngc ? digit_t'(-hd[2]) : hd[2], fx_t'(1) <<< (F - 1));
      d0 = d0 + dig_w(ngc ? digit_t'(-hd[1]) : hd[1], fx_t'(1) <<< (F - 2));
      d0 = d0 + dig_w(ngc ? digit_t'(-hd[0]) : hd[0], fx_t'(1) <<< (F - 3));
    end
    d0 = d0 + dig_w(dpd, fx_t'(1) <<< (F - 4));

    // dividend digit x[j+4] = n[j+3]
    xdig = shift_q ? hn[1] : hn[0];

    dnew = dq + dig_w(dpd, wtd_q);
    v    = (wq <<< 1) + (dig_w(xdig, fx_t'(1) <<< F) >>> 4) - (dig_w(dpd, qq) >>> 4);
    if ((v <<< 1) >= dnew)       qs = 2'sd1;
    else if ((v <<< 1) < -dnew)  qs = -2'sd1;
    else                         qs = 2'sd0;
    wnew = v - dig_w(qs, dnew);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      kin     <= '0;
      inited  <= 1'b0;
      shift_q <= 1'b0;
      neg_q   <= 1'b0;
      dq      <= '0;
      wq      <= '0;
      qq      <= '0;
      wtd_q   <= '0;
      wtq_q   <= '0;
      eq_q    <= '0;
      rv      <= 1'b0;
      rd      <= '0;
      for (int i = 0; i < 4; i++) begin
        hn[i] <= '0;
        hd[i] <= '0;
      end
    end else begin
      rv <= 1'b0;
      if (stop) begin
        run <= 1'b0;
      end else if (step) begin
        run <= 1'b1;
        kin <= first ? KW'(1) : ((kin < KW'(M + 1)) ? kin + 1'b1 : kin);
        for (int i = 3; i > 0; i--) begin
          hn[i] <= first ? 2'sd0 : hn[i-1];
          hd[i] <= first ? 2'sd0 : hd[i-1];
        end
        hn[0] <= nc;
        hd[0] <= dc;
        if (first) begin
          inited  <= 1'b0;
          shift_q <= 1'b0;
          neg_q   <= 1'b0;
          if (n.e == ZERO_EXP) eq_q <= ZERO_EXP;
          else                 eq_q <= sat_exp(16'(n.e) - 16'(d.e) + 16'sd1);
        end
        if (decide_now) begin
          shift_q <= sh;
          neg_q   <= ng;
          if (sh && eq_q != ZERO_EXP) eq_q <= sat_exp(16'(eq_q) + 16'sd1);
        end
        if (init_now) begin
          inited <= 1'b1;
          dq     <= d0;
          // W[0] = n1/4 + n2/8 + n3/16, taken from the history
          wq     <= dig_w(shift_q ? hn[3] : hn[2], fx_t'(1) <<< (F - 2))
                  + dig_w(shift_q ? hn[2] : hn[1], fx_t'(1) <<< (F - 3))
                  + dig_w(shift_q ? hn[1] : hn[0], fx_t'(1) <<< (F - 4));
          qq     <= '0;
          wtd_q  <= fx_t'(1) <<< (F - 5);
          wtq_q  <= fx_t'(1) <<< (F - 1);
        end else if (inited && !first) begin
          dq    <= dnew;
          wq    <= wnew;
          qq    <= qq + dig_w(qs, wtq_q);
          wtd_q <= wtd_q >>> 1;
          wtq_q <= wtq_q >>> 1;
          rv    <= 1'b1;
          rd    <= neg_q ? digit_t'(-qs) : qs;
        end
      end
    end
  end

  logic pn_start;
  assign pn_start = init_now;

  ol_postnorm #(.M(M), .MAXSHIFT(1), .ZERO_OUT(1'b0)) u_pn (
    .clk, .rst_n,
    .start  (pn_start),
    .e_raw  ((decide_now && sh && eq_q != ZERO_EXP) ? sat_exp(16'(eq_q) + 16'sd1) : eq_q),
    .rv     (rv && run),
    .rd     (rd),
    .z      (q),
    .done   (stop),
    .shifted()
  );

  assign busy = run;

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) n.v == d.v);
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (run && kin >= KW'(M)) |-> !n.v);

endmodule
