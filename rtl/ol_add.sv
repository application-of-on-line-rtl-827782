// ol_add: radix-2 floating-point on-line adder (or subtractor, SUB=1).
//
// Operation: z = x + y (or x - y) on quasi-normalized on-line operands.
// In the cycle of the first digit the exponent difference ed = ex - ey is
// formed, the result exponent is max(ex,ey)+1, and from then on the operand
// with the smaller exponent is read |ed| digits late out of a digit history
// (alignment; zeros are read before its first digit).  The aligned digit sum
// p = x' + y' is registered, then the residual recurrence
//     W[j] = 2 (W[j-1] - z[j-1]) + p[j+2] / 8
// runs with two steps of look-ahead; z[j] is W[j] rounded to {-1,0,1}
// (thresholds +-1/2).  W needs only a few bits (units of 1/8 here).  Raw
// digits go through post-normalization, which may shift the result left up
// to M places under cancellation; an all-zero result leaves as zero.
//
// Timing: one result per operation, inputs x and y in lock-step (one digit
// per valid cycle; gaps stall the unit).  The first output digit leaves
// 5 cycles after the first input digit when no left shift is needed, one
// cycle more per shift.  After the input operands' M digits the unit feeds
// itself zeros until M output digits are out; a new operation may start the
// cycle after the last output digit.
// Following the document: exponent handling, alignment, the recurrence and
// its selection thresholds, the post-normalization.  The document's scaling
// of the initial residual is garbled; the scaling here makes z = (x+y)/2 with
// exponent max+1, which keeps |W| <= 5/4.  Valid/stall handling, saturation
// of the exponent and the zero marker are this design's choices.
module ol_add
  import ol_pkg::*;
#(
  parameter int unsigned M   = OL_M,
  parameter bit          SUB = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  x,
  input  ol_t  y,
  output ol_t  z,
  output logic busy,
  output logic shifted   // this result needed post-normalization shifts
);

  localparam int unsigned DMAX = M + 1;   // larger shifts only read zeros
  localparam int unsigned KW   = $clog2(M + 2);

  logic            run;
  logic [KW-1:0]   kin;                  // input digits consumed
  logic [$clog2(DMAX+1)-1:0] dsh_q, dsh; // alignment distance
  logic            xsmall_q, xsmall;     // x is the operand delayed
  digit_t          hist_x [DMAX];        // hist[0] = previous digit
  digit_t          hist_y [DMAX];

  logic   first, step;
  digit_t xc, yc, xa, ya;
  logic signed [8:0] ed;

  always_comb begin
    first  = !run && x.v;
    step   = first || (run && ((kin < KW'(M)) ? x.v : 1'b1));
    xc     = (run && kin >= KW'(M)) ? 2'sd0 : x.d;
    yc     = (run && kin >= KW'(M)) ? 2'sd0 : (SUB ? digit_t'(-y.d) : y.d);
    ed     = 9'(x.e) - 9'(y.e);
    if (first) begin
      xsmall = ed < 0;
      dsh    = (ed < 0) ? (((-ed) > 9'(DMAX)) ? ($bits(dsh))'(DMAX) : ($bits(dsh))'(-ed))
                        : ((ed > 9'(DMAX)) ? ($bits(dsh))'(DMAX) : ($bits(dsh))'(ed));
    end else begin
      xsmall = xsmall_q;
      dsh    = dsh_q;
    end
    // aligned digits
    xa = xc;
    ya = yc;
    if (dsh != 0) begin
      if (xsmall) xa = first ? 2'sd0 : hist_x[dsh-1];
      else        ya = first ? 2'sd0 : hist_y[dsh-1];
    end
  end

  // alignment stage
  logic            pv;
  logic signed [2:0] pd;
  logic            pn_start;
  exp_t            e_raw;
  logic            stop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      kin      <= '0;
      dsh_q    <= '0;
      xsmall_q <= 1'b0;
      pv       <= 1'b0;
      pd       <= '0;
      for (int i = 0; i < int'(DMAX); i++) begin
        hist_x[i] <= '0;
        hist_y[i] <= '0;
      end
    end else begin
      pv <= 1'b0;
      if (stop) begin
        run <= 1'b0;
      end else if (step) begin
        run      <= 1'b1;
        kin      <= first ? KW'(1) : ((kin < KW'(M)) ? kin + 1'b1 : kin);
        dsh_q    <= dsh;
        xsmall_q <= xsmall;
        pv       <= 1'b1;
        pd       <= 3'(xa) + 3'(ya);
        for (int i = int'(DMAX) - 1; i > 0; i--) begin
          hist_x[i] <= first ? 2'sd0 : hist_x[i-1];
          hist_y[i] <= first ? 2'sd0 : hist_y[i-1];
        end
        hist_x[0] <= xc;
        hist_y[0] <= yc;
      end
    end
  end

  always_comb begin
    pn_start = first;
    e_raw    = sat_exp(16'((x.e > y.e) ? x.e : y.e) + 16'sd1);
  end

  // residual recurrence, W in units of 1/8
  logic signed [5:0] r_q, w;
  logic signed [2:0] jq;                 // -1, 0, then saturates at 1
  digit_t            zs;
  logic              rv;
  digit_t            rd;

  always_comb begin
    w  = 6'(2 * r_q) + 6'(pd);
    if (jq < 1)          zs = 2'sd0;
    else if (w >= 6'sd4) zs = 2'sd1;
    else if (w < -6'sd4) zs = -2'sd1;
    else                 zs = 2'sd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q <= '0;
      jq  <= -3'sd1;
      rv  <= 1'b0;
      rd  <= '0;
    end else begin
      rv <= 1'b0;
      if (first || stop) begin
        r_q <= '0;
        jq  <= -3'sd1;
      end else if (pv) begin
        r_q <= w - 6'(8 * zs);
        if (jq < 1) jq <= jq + 3'sd1;
        rv  <= (jq >= 1);
        rd  <= zs;
      end
    end
  end

  ol_postnorm #(.M(M), .MAXSHIFT(M), .ZERO_OUT(1'b1)) u_pn (
    .clk, .rst_n,
    .start  (pn_start),
    .e_raw  (e_raw),
    .rv     (rv && run),
    .rd     (rd),
    .z      (z),
    .done   (stop),
    .shifted(shifted)
  );

  assign busy = run;

  // operands must arrive in lock-step, and not while a result is pending
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) x.v == y.v);
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (run && kin >= KW'(M)) |-> !x.v);

endmodule
