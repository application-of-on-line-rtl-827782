// tb_ol_fdb: self-checking testbench of ol_fdb.  Random valid/exponent/
// digit patterns go in; the output must equal the input of exactly DELAY
// cycles earlier (checked against a model history), for DELAY = 7.
module tb_ol_fdb;
  import ol_pkg::*;

  localparam int D = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ol_t in, out;
  ol_t hist [$];
  int  checks = 0, failures = 0;

  ol_fdb #(.DELAY(D)) dut (.clk, .rst_n, .in, .out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = OL_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D - 1; i++) hist.push_back(OL_IDLE);
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in = '{v: 1'($urandom), e: exp_t'($urandom), d: digit_t'(int'($urandom % 3) - 1)};
      hist.push_back(in);
      @(posedge clk);
      #1;
      checks++;
      if (out !== hist[0]) begin
        failures++;
        $display("FAIL cycle %0d", t);
      end
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
