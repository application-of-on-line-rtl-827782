// tb_svd_array: end-to-end self-checking testbench of the SVD array at full
// size (N = 8, S = 10, M = 56: the default parameters, no override).
//
// A random 8x8 matrix is loaded, with two blocks shaped to provoke
// particular mechanisms: diagonal block 1 is symmetric (nu2 = a21 - a12 = 0
// exactly, so the epsilon test passes in the first iteration) and diagonal
// block 2 has a11 = a22 (mu1 = 0: total cancellation in the adder, rho = 0).
// A real-valued model of the same algorithm (same angle formulas, same
// diagonal forcing, same exchange pattern, same number of iterations) runs
// alongside; every element of the result is compared with it.  The result
// is also checked to be an SVD: the Frobenius norm is preserved and the
// off-diagonal part has vanished.  The iteration period of diagonal
// processor 0 is measured and checked against a bound, and the mechanisms
// seen are counted (epsilon-test passes and misses, post-normalization
// shifts of an adder, divisor shifts, waits in a delay buffer, exchanges)
// and each must have happened at least once.
module tb_svd_array;
  import ol_pkg::*;
  import ol_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 8;
  localparam int S = 10;
  localparam int M = OL_M;
  localparam int K = N / 2;
  localparam int ITERS = S * (N - 1);
  localparam real TOL = 1.0e-9;      // relative to the matrix norm
  // iteration period bounds: nominal (no cancellation) and worst case: each
  // of the 7 adders on the angle-plus-rotation path (mu, 1 + rho^2, |rho| +
  // root, 1 + tau^2, angle combination, two rotation levels) may cancel and
  // add up to M cycles
  localparam int  T_CYC_NOM = 125;
  localparam int  T_CYC_MAX = 125 + 7 * M;

  ol_t ld  [K][K][2][2];
  ol_t res [K][K][2][2];
  logic [K-1:0][1:0] eps_hit;

  svd_array dut (.clk, .rst_n, .ld, .res, .eps_hit);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired at cycle %0d", cyc);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  real A [N][N];
  real B [K][K][2][2];

  function automatic int src_slot(input int kd, input int sd);
    if (sd == 0) return (kd == 0) ? 0 : (kd == 1) ? 1 : 2 * (kd - 1);
    else         return (kd == K - 1) ? 2 * (K - 1) : 2 * (kd + 1) + 1;
  endfunction

  // chi and sigma of one half-angle; the epsilon test is taken as |nu| <=
  // 2^-52 |mu| (the hardware's exponent rule differs only far below the
  // tolerance)
  task automatic half_angle(input real mu, input real nu, output real chi, output real sig);
    real rho, tau;
    if (fabs(nu) <= fabs(mu) * (2.0 ** (-52))) begin
      chi = 1.0; sig = 0.0;
      return;
    end
    rho = mu / nu;
    tau = ((rho < 0) ? -1.0 : 1.0) / (fabs(rho) + $sqrt(1.0 + rho * rho));
    chi = 1.0 / $sqrt(1.0 + tau * tau);
    sig = chi * tau;
  endtask

  task automatic model_run();
    real cl [K], sl [K], cr [K], sr [K];
    real Bn [K][K][2][2];
    for (int it = 0; it < ITERS; it++) begin
      for (int p = 0; p < K; p++) begin
        real c1, s1, c2, s2;
        half_angle(B[p][p][1][1] - B[p][p][0][0], B[p][p][1][0] + B[p][p][0][1], c1, s1);
        half_angle(B[p][p][1][1] + B[p][p][0][0], B[p][p][1][0] - B[p][p][0][1], c2, s2);
        cl[p] = c1 * c2 + s1 * s2;
        sl[p] = s1 * c2 - c1 * s2;
        cr[p] = c1 * c2 - s1 * s2;
        sr[p] = s1 * c2 + c1 * s2;
      end
      for (int p = 0; p < K; p++) begin
        for (int q = 0; q < K; q++) begin
          real u1, u2, u3, u4;
          u1 = cl[p] * B[p][q][0][0] - sl[p] * B[p][q][1][0];
          u2 = cl[p] * B[p][q][0][1] - sl[p] * B[p][q][1][1];
          u3 = sl[p] * B[p][q][0][0] + cl[p] * B[p][q][1][0];
          u4 = sl[p] * B[p][q][0][1] + cl[p] * B[p][q][1][1];
          Bn[p][q][0][0] = cr[q] * u1 - sr[q] * u2;
          Bn[p][q][0][1] = sr[q] * u1 + cr[q] * u2;
          Bn[p][q][1][0] = cr[q] * u3 - sr[q] * u4;
          Bn[p][q][1][1] = sr[q] * u3 + cr[q] * u4;
          if (p == q) begin
            Bn[p][q][0][1] = 0.0;
            Bn[p][q][1][0] = 0.0;
          end
        end
      end
      if (it == ITERS - 1) begin
        B = Bn;
      end else begin
        for (int p = 0; p < K; p++)
          for (int q = 0; q < K; q++)
            for (int r = 0; r < 2; r++)
              for (int c = 0; c < 2; c++) begin
                int sr_, sc_;
                sr_ = src_slot(p, r);
                sc_ = src_slot(q, c);
                B[p][q][r][c] = Bn[sr_/2][sc_/2][sr_%2][sc_%2];
              end
      end
    end
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_eps_pass = 0, n_eps_miss = 0, n_add_shift = 0, n_div_shift = 0;
  int n_vdb_wait = 0, n_exch = 0, n_res_ops = 0;
  int t_iter [$];

  always @(posedge clk) if (rst_n) begin
    if (dut.g_row[0].g_col[0].g_diag.u_p.u_ang.g_half[0].u_eps.hit_v) begin
      if (dut.g_row[0].g_col[0].g_diag.u_p.u_ang.g_half[0].u_eps.hit) n_eps_pass++; else n_eps_miss++;
    end
    if (dut.g_row[1].g_col[1].g_diag.u_p.u_ang.g_half[1].u_eps.hit_v) begin
      if (dut.g_row[1].g_col[1].g_diag.u_p.u_ang.g_half[1].u_eps.hit) n_eps_pass++; else n_eps_miss++;
    end
    if (dut.g_row[2].g_col[2].g_diag.u_p.u_ang.g_half[0].u_mu.z.v &&
        dut.g_row[2].g_col[2].g_diag.u_p.u_ang.g_half[0].u_mu.shifted &&
        dut.g_row[2].g_col[2].g_diag.u_p.u_ang.g_half[0].u_mu.u_pn.cnt == 0)
      n_add_shift++;
    if (dut.g_row[0].g_col[0].g_diag.u_p.u_ang.g_half[0].u_rho.decide_now &&
        dut.g_row[0].g_col[0].g_diag.u_p.u_ang.g_half[0].u_rho.sh)
      n_div_shift++;
    // operand waiting in the input buffer of a diagonal processor
    if (dut.g_row[0].g_col[0].g_diag.u_p.u_ang.u_in.in[0].v &&
        !dut.g_row[0].g_col[0].g_diag.u_p.u_ang.u_in.out[0].v)
      n_vdb_wait++;
    // first digit of a new block at diagonal processor 0
    if (dut.ein[0][0][0][0].v && dut.g_row[0].g_col[0].g_r[0].g_c[0].dcnt == 0 &&
        !dut.ld[0][0][0][0].v) begin
      n_exch++;
    end
    if (dut.g_row[0].g_col[0].g_diag.u_p.u_ang.u_in.out[0].v &&
        dut.g_row[0].g_col[0].g_diag.u_p.u_ang.g_half[0].u_mu.run == 1'b0)
      t_iter.push_back(cyc);
  end

  // ------------------------------------------------------------- stimulus
  opnd_t lo [K][K][2][2];
  opnd_t ro [K][K][2][2];
  bit    got [K][K][2][2];

  initial begin
    real nrm2 = 0.0, nrm2_out = 0.0, off2 = 0.0, err_max = 0.0;
    int  t_load, t_done;
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) begin
            ld[p][q][r][c] = OL_IDLE;
            got[p][q][r][c] = 1'b0;
          end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        A[i][j] = urand(-1.0, 1.0);
    A[3][2] = A[2][3];            // block (1,1) symmetric: nu2 = 0
    A[5][5] = A[4][4];            // block (2,2): mu1 = 0
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) begin
            lo[p][q][r][c] = from_real(A[2*p+r][2*q+c], M, 20);
            B[p][q][r][c]  = to_real(lo[p][q][r][c]);
            nrm2 += B[p][q][r][c] ** 2;
          end
    model_run();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t_load = cyc;
    for (int k = 0; k < M; k++) begin
      for (int p = 0; p < K; p++)
        for (int q = 0; q < K; q++)
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++)
              ld[p][q][r][c] = '{v: 1'b1, e: exp_t'(lo[p][q][r][c].e),
                                 d: digit_t'(lo[p][q][r][c].d[k])};
      @(negedge clk);
    end
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++)
            ld[p][q][r][c] = OL_IDLE;

    // collect the result operands
    begin
      int ndone = 0;
      int idx [K][K][2][2];
      for (int p = 0; p < K; p++)
        for (int q = 0; q < K; q++)
          for (int r = 0; r < 2; r++)
            for (int c = 0; c < 2; c++) begin
              idx[p][q][r][c] = 0;
              ro[p][q][r][c].d = new[M];
            end
      while (ndone < N * N) begin
        @(posedge clk);
        for (int p = 0; p < K; p++)
          for (int q = 0; q < K; q++)
            for (int r = 0; r < 2; r++)
              for (int c = 0; c < 2; c++)
                if (res[p][q][r][c].v) begin
                  if (idx[p][q][r][c] >= M) begin
                    failures++;
                    $display("FAIL extra result digit at (%0d,%0d,%0d,%0d)", p, q, r, c);
                  end else begin
                    ro[p][q][r][c].e = int'(res[p][q][r][c].e);
                    ro[p][q][r][c].d[idx[p][q][r][c]] = int'(res[p][q][r][c].d);
                    idx[p][q][r][c]++;
                    if (idx[p][q][r][c] == M) begin
                      ndone++;
                      n_res_ops++;
                    end
                  end
                end
      end
      t_done = cyc;
    end
    repeat (200) @(posedge clk);
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++)
            if (res[p][q][r][c].v) failures++;

    // compare with the model, and check the SVD properties
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++)
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 2; c++) begin
            real v, err;
            v   = to_real(ro[p][q][r][c]);
            err = fabs(v - B[p][q][r][c]);
            if (err > err_max) err_max = err;
            nrm2_out += v * v;
            if (2 * p + r != 2 * q + c) off2 += v * v;
            checks++;
            if (err > TOL * $sqrt(nrm2)) begin
              failures++;
              $display("FAIL element (%0d,%0d): got %g, model %g", 2*p+r, 2*q+c, v, B[p][q][r][c]);
            end
          end
    checks += 2;
    if (fabs(nrm2_out - nrm2) > TOL * nrm2) begin
      failures++;
      $display("FAIL Frobenius norm^2 %g, expected %g", nrm2_out, nrm2);
    end
    if ($sqrt(off2) > 1.0e-12 * $sqrt(nrm2)) begin
      failures++;
      $display("FAIL off-diagonal norm %g", $sqrt(off2));
    end
    $display("singular values (signed):");
    for (int p = 0; p < K; p++)
      $display("  %g  %g", to_real(ro[p][p][0][0]), to_real(ro[p][p][1][1]));
    $display("max element error %g, off-diagonal norm %g", err_max, $sqrt(off2));

    // timing: iteration period and total time
    begin
      int pmax = 0, pmin = 1 << 30;
      for (int i = 1; i < t_iter.size(); i++) begin
        if (t_iter[i] - t_iter[i-1] > pmax) pmax = t_iter[i] - t_iter[i-1];
        if (t_iter[i] - t_iter[i-1] < pmin) pmin = t_iter[i] - t_iter[i-1];
      end
      $display("iterations seen %0d, period %0d..%0d cycles, total %0d cycles (document: %0d)",
               t_iter.size(), pmin, pmax, t_done - t_load, ITERS * 107 + N / 2 + 53);
      checks += 2;
      if (t_iter.size() != ITERS) begin
        failures++;
        $display("FAIL %0d iterations at processor 0, expected %0d", t_iter.size(), ITERS);
      end
      checks++;
      if (pmin > T_CYC_NOM) begin
        failures++;
        $display("FAIL shortest iteration period %0d above %0d", pmin, T_CYC_NOM);
      end
      if (pmax > T_CYC_MAX) begin
        failures++;
        $display("FAIL iteration period %0d above %0d", pmax, T_CYC_MAX);
      end
    end

    $display("mechanisms: eps pass %0d, eps miss %0d, adder shifts %0d, divisor shifts %0d, buffer waits %0d, exchanges %0d, results %0d",
             n_eps_pass, n_eps_miss, n_add_shift, n_div_shift, n_vdb_wait, n_exch, n_res_ops);
    checks += 7;
    if (n_eps_pass == 0) failures++;
    if (n_eps_miss == 0) failures++;
    if (n_add_shift == 0) failures++;
    if (n_div_shift == 0) failures++;
    if (n_vdb_wait == 0) failures++;
    if (n_exch != ITERS - 1) failures++;
    if (n_res_ops != N * N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
