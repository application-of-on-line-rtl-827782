// tb_ol_eps_test: self-checking testbench of ol_eps_test with EPS_K = 10.
// Pairs (mu, nu) with random exponents, and nu = 0, are streamed in; `hit`
// must equal the exponent rule e_nu - e_mu + 2 <= -10 (or nu zero), which
// is recomputed here, and hit_v must pulse once per pair.  Pairs on both
// sides of the boundary are included.
module tb_ol_eps_test;
  import ol_pkg::*;

  localparam int M = 56;
  localparam int K = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ol_t  mu, nu;
  logic hit, hit_v;
  int   checks = 0, failures = 0, npass = 0, nfail = 0;

  ol_eps_test #(.M(M), .EPS_K(K)) dut (.clk, .rst_n, .mu, .nu, .hit, .hit_v);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int em, en, pulses;
    bit expect_hit;
    mu = OL_IDLE; nu = OL_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 80; op++) begin
      em = int'($urandom % 40) - 20;
      en = em - 14 + int'($urandom % 8);
      if (op % 10 == 3) en = -128;
      expect_hit = (en == -128) || (en - em + 2 <= -K);
      pulses = 0;
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        mu = '{v: 1'b1, e: exp_t'(em), d: (k == 0) ? 2'sd1 : 2'sd0};
        nu = '{v: 1'b1, e: exp_t'(en), d: (k == 0) ? -2'sd1 : 2'sd0};
        #1;
        if (hit_v) pulses++;
      end
      @(negedge clk);
      mu = OL_IDLE; nu = OL_IDLE;
      checks += 2;
      if (hit != expect_hit) begin
        failures++;
        $display("FAIL e_mu=%0d e_nu=%0d hit=%0b", em, en, hit);
      end
      if (pulses != 1) failures++;
      if (expect_hit) npass++; else nfail++;
    end
    checks++;
    if (npass == 0 || nfail == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
