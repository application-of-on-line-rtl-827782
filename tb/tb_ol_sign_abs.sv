// tb_ol_sign_abs: self-checking testbench of ol_sign_abs.  Random signed
// operands (redundant digits) go in; the absolute-value stream must have the
// value |x| and the sign stream the value +1 or -1, both in step with the
// input (same cycles, no delay).
module tb_ol_sign_abs;
  import ol_pkg::*;
  import ol_tb_pkg::*;

  localparam int M = 56;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ol_t x, absx, sgnx;
  int  checks = 0, failures = 0;

  ol_sign_abs #(.M(M)) dut (.clk, .rst_n, .x, .absx, .sgnx);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opnd_t ox, oa, os;
    real v;
    x = OL_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 100; op++) begin
      v  = rand_val(-5, 5);
      ox = from_real(v, M, 40);
      v  = to_real(ox);
      oa.d = new[M];
      os.d = new[M];
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        x = '{v: 1'b1, e: exp_t'(ox.e), d: digit_t'(ox.d[k])};
        #1;
        checks++;
        if (!absx.v || !sgnx.v) failures++;
        oa.e = int'(absx.e); oa.d[k] = int'(absx.d);
        os.e = int'(sgnx.e); os.d[k] = int'(sgnx.d);
      end
      @(negedge clk);
      x = OL_IDLE;
      checks += 2;
      if (to_real(oa) != fabs(v)) begin failures++; $display("FAIL abs of %g gave %g", v, to_real(oa)); end
      if (to_real(os) != ((v < 0) ? -1.0 : 1.0)) begin failures++; $display("FAIL sign of %g", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
