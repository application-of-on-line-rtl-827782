// tb_ol_const: self-checking testbench of ol_const.  Two instances, the
// constant 1 and the constant 0, follow a trigger stream with gaps; each
// operand of M digits must come out as first digit D1 then zeros, with the
// constant exponent, exactly on the trigger's cycles.
module tb_ol_const;
  import ol_pkg::*;
  import ol_tb_pkg::*;

  localparam int M = 56;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic trig;
  ol_t  one, zero;
  int   checks = 0, failures = 0;

  ol_const #(.M(M)) dut_one (.clk, .rst_n, .trig, .out(one));
  ol_const #(.M(M), .CE(ZERO_EXP), .D1(2'sd0)) dut_zero (.clk, .rst_n, .trig, .out(zero));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opnd_t o1, o0;
    trig = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 5; op++) begin
      o1.d = new[M];
      o0.d = new[M];
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        trig = 1'b0;
        while (($urandom % 4) == 0) @(negedge clk);
        trig = 1'b1;
        #1;
        checks++;
        if (!one.v || !zero.v) failures++;
        o1.e = int'(one.e);  o1.d[k] = int'(one.d);
        o0.e = int'(zero.e); o0.d[k] = int'(zero.d);
      end
      @(negedge clk);
      trig = 1'b0;
      #1;
      checks++;
      if (one.v || zero.v) failures++;
      checks += 2;
      if (to_real(o1) != 1.0) begin failures++; $display("FAIL one = %g", to_real(o1)); end
      if (to_real(o0) != 0.0 || o0.e != -128) begin failures++; $display("FAIL zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
