// fhsvd_angle: on-line network for the rotation angles of a 2x2 block
// [a11 a12; a21 a22] (algorithm FHSVD of Brent, Luk and van Loan).  For the
// two half-angles k = 1, 2:
//     mu1 = a22 - a11   nu1 = a21 + a12      mu2 = a22 + a11   nu2 = a21 - a12
//     rho = mu/nu,  tau = sign(rho) / (|rho| + sqrt(1 + rho^2)),
//     chi = 1 / sqrt(1 + tau^2),  sigma = chi * tau
// and chi = 1, sigma = 0 when |nu| <= eps |mu|.  Then
//     cL = chi1 chi2 + sig1 sig2     sL = sig1 chi2 - chi1 sig2
//     cR = chi1 chi2 - sig1 sig2     sR = sig1 chi2 + chi1 sig2.
// Every operation is its own on-line unit and the units are chained digit
// by digit.  The four block elements are synchronized by one variable delay
// buffer; mu/nu meet in a buffer in front of the divider; |rho| and tau wait
// in fixed delay buffers (FDB_ABS, FDB_TAU cycles) on their way to the units
// they meet later, and variable delay buffers in front of every two-operand
// unit absorb what remains.  The constants 1 come from registers released in
// step with their partner.  The epsilon test runs on the exponents of mu and
// nu while rho is computed, and its result, held until chi and sigma appear,
// replaces them by the constants 1 and 0.
// Interface: on-line operands (ol_t), one block per operation; each output
// is an M-digit operand.  The on-line delay from the block elements to the
// outputs is about 80 cycles; the outputs leave at different times.
// Following the document: the network of units, the order of operations,
// the delay buffers and the forcing on a successful test.  The fixed delay
// amounts and the buffer placement at every join are this design's choices.
module fhsvd_angle
  import ol_pkg::*;
#(
  parameter int unsigned M       = OL_M,
  parameter int unsigned DEPTH   = 128,
  parameter int unsigned EPS_K   = 50,
  parameter int unsigned FDB_ABS = 14,
  parameter int unsigned FDB_TAU = 22
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  a11,
  input  ol_t  a12,
  input  ol_t  a21,
  input  ol_t  a22,
  output ol_t  cl,
  output ol_t  sl,
  output ol_t  cr,
  output ol_t  sr,
  output logic [1:0] eps_hit   // per half-angle: the test passed (held)
);

  ol_t ain [4];
  ol_t aj  [4];

  assign ain[0] = a11;
  assign ain[1] = a12;
  assign ain[2] = a21;
  assign ain[3] = a22;

  ol_vdb #(.N(4), .DEPTH(DEPTH)) u_in (.clk, .rst_n, .in(ain), .ready(1'b1), .out(aj));

  ol_t chi [2];
  ol_t sig [2];

  for (genvar k = 0; k < 2; k++) begin : g_half
    ol_t mu, nu, rho, rsq, one_a, t1, r1, absr, sgnr, absd, den, tau;
    ol_t tsq, one_b, t2, r2, one_c, chi_raw, taud, sig_raw, one_f, zero_f;
    ol_t mn_in [2];
    ol_t mn    [2];
    logic hit, hit_v;

    // mu = a22 -/+ a11, nu = a21 +/- a12
    ol_add #(.M(M), .SUB(k == 0)) u_mu (.clk, .rst_n, .x(aj[3]), .y(aj[0]), .z(mu), .busy(), .shifted());
    ol_add #(.M(M), .SUB(k == 1)) u_nu (.clk, .rst_n, .x(aj[2]), .y(aj[1]), .z(nu), .busy(), .shifted());

    assign mn_in[0] = mu;
    assign mn_in[1] = nu;
    ol_vdb #(.N(2), .DEPTH(DEPTH)) u_mn (.clk, .rst_n, .in(mn_in), .ready(1'b1), .out(mn));

    ol_eps_test #(.M(M), .EPS_K(EPS_K)) u_eps (.clk, .rst_n, .mu(mn[0]), .nu(mn[1]), .hit, .hit_v);
    assign eps_hit[k] = hit;

    ol_div #(.M(M)) u_rho (.clk, .rst_n, .n(mn[0]), .d(mn[1]), .q(rho), .busy());

    // sqrt(1 + rho^2)
    ol_mul   #(.M(M)) u_rsq (.clk, .rst_n, .x(rho), .y(rho), .z(rsq), .busy());
    ol_const #(.M(M)) u_one_a (.clk, .rst_n, .trig(rsq.v), .out(one_a));
    ol_add   #(.M(M)) u_t1 (.clk, .rst_n, .x(rsq), .y(one_a), .z(t1), .busy(), .shifted());
    ol_sqrt  #(.M(M)) u_r1 (.clk, .rst_n, .x(t1), .s(r1), .busy());

    // tau = sign(rho) / (|rho| + sqrt(1 + rho^2))
    ol_sign_abs #(.M(M)) u_sa (.clk, .rst_n, .x(rho), .absx(absr), .sgnx(sgnr));
    ol_fdb #(.DELAY(FDB_ABS)) u_dabs (.clk, .rst_n, .in(absr), .out(absd));
    ol_op2 #(.OP(OP_ADD), .M(M), .DEPTH(DEPTH)) u_den (.clk, .rst_n, .a(absd), .b(r1), .z(den));
    ol_op2 #(.OP(OP_DIV), .M(M), .DEPTH(DEPTH)) u_tau (.clk, .rst_n, .a(sgnr), .b(den), .z(tau));

    // chi = 1 / sqrt(1 + tau^2)
    ol_mul   #(.M(M)) u_tsq (.clk, .rst_n, .x(tau), .y(tau), .z(tsq), .busy());
    ol_const #(.M(M)) u_one_b (.clk, .rst_n, .trig(tsq.v), .out(one_b));
    ol_add   #(.M(M)) u_t2 (.clk, .rst_n, .x(tsq), .y(one_b), .z(t2), .busy(), .shifted());
    ol_sqrt  #(.M(M)) u_r2 (.clk, .rst_n, .x(t2), .s(r2), .busy());
    ol_const #(.M(M)) u_one_c (.clk, .rst_n, .trig(r2.v), .out(one_c));
    ol_div   #(.M(M)) u_chi (.clk, .rst_n, .n(one_c), .d(r2), .q(chi_raw), .busy());

    // sigma = chi * tau
    ol_fdb #(.DELAY(FDB_TAU)) u_dtau (.clk, .rst_n, .in(tau), .out(taud));
    ol_op2 #(.OP(OP_MUL), .M(M), .DEPTH(DEPTH)) u_sig (.clk, .rst_n, .a(chi_raw), .b(taud), .z(sig_raw));

    // forcing on a successful epsilon test: chi = 1, sigma = 0
    ol_const #(.M(M)) u_one_f (.clk, .rst_n, .trig(chi_raw.v), .out(one_f));
    ol_const #(.M(M), .CE(ZERO_EXP), .D1(2'sd0)) u_zero_f (.clk, .rst_n, .trig(sig_raw.v), .out(zero_f));
    assign chi[k] = hit ? one_f : chi_raw;
    assign sig[k] = hit ? zero_f : sig_raw;
  end

  // combination of the two half-angles
  ol_t cc, ss, sc, cs;
  ol_op2 #(.OP(OP_MUL), .M(M), .DEPTH(DEPTH)) u_cc (.clk, .rst_n, .a(chi[0]), .b(chi[1]), .z(cc));
  ol_op2 #(.OP(OP_MUL), .M(M), .DEPTH(DEPTH)) u_ss (.clk, .rst_n, .a(sig[0]), .b(sig[1]), .z(ss));
  ol_op2 #(.OP(OP_MUL), .M(M), .DEPTH(DEPTH)) u_sc (.clk, .rst_n, .a(sig[0]), .b(chi[1]), .z(sc));
  ol_op2 #(.OP(OP_MUL), .M(M), .DEPTH(DEPTH)) u_cs (.clk, .rst_n, .a(chi[0]), .b(sig[1]), .z(cs));

  ol_op2 #(.OP(OP_ADD), .M(M), .DEPTH(DEPTH)) u_cl (.clk, .rst_n, .a(cc), .b(ss), .z(cl));
  ol_op2 #(.OP(OP_SUB), .M(M), .DEPTH(DEPTH)) u_sl (.clk, .rst_n, .a(sc), .b(cs), .z(sl));
  ol_op2 #(.OP(OP_SUB), .M(M), .DEPTH(DEPTH)) u_cr (.clk, .rst_n, .a(cc), .b(ss), .z(cr));
  ol_op2 #(.OP(OP_ADD), .M(M), .DEPTH(DEPTH)) u_sr (.clk, .rst_n, .a(sc), .b(cs), .z(sr));

endmodule
