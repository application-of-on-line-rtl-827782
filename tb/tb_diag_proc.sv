// tb_diag_proc: self-checking testbench of diag_proc.
//
// Four random elements per operation (some with nu2 = 0 or mu1 = 0);
// outputs the diagonalized block b11, b12 = 0, b21 = 0, b22 and the
// angles cL, sL, cR, sR.
// Each operation drives the block elements (and, where the block takes
// them, rotation angles of random angle, starting ANG_OFF cycles later, the
// way they arrive in the array), collects every output operand and compares
// it with a real-valued model of the same formulas; the error bound is
// TOL relative to the largest element.  The on-line delay from the first
// element digit to the first digit of every output is measured; the
// shortest must stay within LAT_NOM (no cancellation) and the longest within
// LAT_MAX.  The document's delays: 82 cycles for the angles, 24 for a
// rotation after its angles (here ANG_OFF + rotation).  Operations follow each other back to back.
module tb_diag_proc;
  import ol_pkg::*;
  import ol_tb_pkg::*;

  localparam int M = OL_M;
  localparam int NOPS = 16;
  localparam int NI = 4;
  localparam int NO = 8;
  localparam int ANG_OFF = 30;
  localparam int LAT_NOM = 90;   // nominal delay: bound on the shortest
  localparam int LAT_MAX = 190;   // worst case, with cancellation
  localparam real TOL = 1.0e-12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ol_t in  [NI];
  ol_t out [NO];
  logic [1:0] eps_hit;
  int checks = 0, failures = 0, cyc = 0;
  int lat_min = 1 << 30, lat_max = 0, n_eps = 0;
  always @(posedge clk) cyc++;

  diag_proc dut (.clk, .rst_n, .a11(in[0]), .a12(in[1]), .a21(in[2]), .a22(in[3]), .b11(out[0]), .b12(out[1]), .b21(out[2]), .b22(out[3]), .cl(out[4]), .sl(out[5]), .cr(out[6]), .sr(out[7]), .eps_hit);
  always @(posedge clk) if (rst_n && dut.u_ang.g_half[0].u_eps.hit_v && dut.u_ang.g_half[0].u_eps.hit) n_eps++;
  always @(posedge clk) if (rst_n && dut.u_ang.g_half[1].u_eps.hit_v && dut.u_ang.g_half[1].u_eps.hit) n_eps++;

  initial begin
    repeat (NOPS * 400 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void half_angle(input real mu, input real nu, output real chi, output real sig);
    real rho, tau;
    if (nu == 0.0) begin
      chi = 1.0; sig = 0.0;
      return;
    end
    rho = mu / nu;
    tau = ((rho < 0) ? -1.0 : 1.0) / (fabs(rho) + $sqrt(1.0 + rho * rho));
    chi = 1.0 / $sqrt(1.0 + tau * tau);
    sig = chi * tau;
  endfunction

  opnd_t oi [NI];
  opnd_t oo [NO];
  real   ri [NI];
  real   ref_o [NO];
  int    t0;

  task automatic drive(input int i, input int off);
    repeat (off) @(negedge clk);
    for (int k = 0; k < M; k++) begin
      @(negedge clk);
      if (i == 0 && k == 0) t0 = cyc;
      in[i] = '{v: 1'b1, e: exp_t'(oi[i].e), d: digit_t'(oi[i].d[k])};
    end
    @(negedge clk);
    in[i] = OL_IDLE;
  endtask

  task automatic collect();
    int n [NO];
    int ndone = 0;
    foreach (n[o]) begin
      n[o] = 0;
      oo[o].d = new[M];
    end
    while (ndone < NO) begin
      @(posedge clk);
      for (int o = 0; o < NO; o++)
        if (out[o].v) begin
          if (n[o] == 0) begin
            if (cyc - t0 > lat_max) lat_max = cyc - t0;
            if (cyc - t0 < lat_min) lat_min = cyc - t0;
          end
          oo[o].e = int'(out[o].e);
          oo[o].d[n[o]] = int'(out[o].d);
          n[o]++;
          if (n[o] == M) ndone++;
        end
    end
  endtask

  initial begin
    real amax;
    for (int i = 0; i < NI; i++) in[i] = OL_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      amax = 0.0;
      for (int i = 0; i < NI; i++) begin
        ri[i] = (i < 4) ? urand(-1.0, 1.0) : 0.0;
        if (i < 4 && fabs(ri[i]) > amax) amax = fabs(ri[i]);
      end
      if (op % 4 == 1) ri[2] = ri[1];          // nu2 = 0: epsilon test passes
      if (op % 4 == 2) ri[3] = ri[0];          // mu1 = 0: full cancellation
      for (int i = 0; i < NI; i++) begin
        oi[i] = from_real(ri[i], M, 20);
        ri[i] = to_real(oi[i]);
      end
      begin
      real cl, sl, cr, sr, b11, b12, b21, b22;
      begin
        real c1, s1, c2, s2;
        half_angle(ri[3] - ri[0], ri[2] + ri[1], c1, s1);
        half_angle(ri[3] + ri[0], ri[2] - ri[1], c2, s2);
        cl = c1 * c2 + s1 * s2;
        sl = s1 * c2 - c1 * s2;
        cr = c1 * c2 - s1 * s2;
        sr = s1 * c2 + c1 * s2;
      end
      begin
        real u1, u2, u3, u4;
        u1 = cl * ri[0] - sl * ri[2];
        u2 = cl * ri[1] - sl * ri[3];
        u3 = sl * ri[0] + cl * ri[2];
        u4 = sl * ri[1] + cl * ri[3];
        b11 = cr * u1 - sr * u2;
        b12 = sr * u1 + cr * u2;
        b21 = cr * u3 - sr * u4;
        b22 = sr * u3 + cr * u4;
      end
      ref_o = '{b11, 0.0, 0.0, b22, cl, sl, cr, sr};
      end
      fork
        drive(0, 0);
        drive(1, 0);
        drive(2, 0);
        drive(3, 0);
        collect();
      join
      for (int o = 0; o < NO; o++) begin
        real v;
        v = to_real(oo[o]);
        checks++;
        if (fabs(v - ref_o[o]) > TOL * (amax + 1.0)) begin
          failures++;
          $display("FAIL op %0d output %0d: got %g, model %g", op, o, v, ref_o[o]);
        end
      end
    end
    $display("on-line delay to the outputs: %0d..%0d cycles", lat_min, lat_max);
    checks++;
    checks++;
    if (lat_min > LAT_NOM) begin
      failures++;
      $display("FAIL shortest delay %0d above %0d", lat_min, LAT_NOM);
    end
    if (lat_max > LAT_MAX) begin
      failures++;
      $display("FAIL delay %0d above %0d", lat_max, LAT_MAX);
    end
    checks++;
    if (n_eps == 0) begin
      failures++;
      $display("FAIL the epsilon test never passed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
