// tb_ol_vdb: self-checking testbench of ol_vdb (three inputs).  Three
// operand streams start at random relative offsets (up to 40 cycles apart,
// some with gaps); the buffer must release them in lock-step, in order,
// with the release starting exactly when the latest operand's first digit
// arrives (no added delay when in phase).
module tb_ol_vdb;
  import ol_pkg::*;

  localparam int M = 56;
  localparam int N = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ol_t in  [N];
  ol_t out [N];
  int  checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  ol_vdb #(.N(N), .DEPTH(64)) dut (.clk, .rst_n, .in, .ready(1'b1), .out);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exps [N];
  int digs [N][M];
  int offs [N];
  int tfirst [N];

  task automatic drive(input int i, input bit gaps);
    repeat (offs[i]) @(negedge clk);
    for (int k = 0; k < M; k++) begin
      @(negedge clk);
      if (k == 0) tfirst[i] = cyc;
      in[i] = '{v: 1'b1, e: exp_t'(exps[i]), d: digit_t'(digs[i][k])};
    end
    @(negedge clk);
    in[i] = OL_IDLE;
  endtask

  initial begin
    for (int i = 0; i < N; i++) in[i] = OL_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int n, trel, tmax;
      n = 0; trel = -1; tmax = 0;
      for (int i = 0; i < N; i++) begin
        exps[i] = int'($urandom % 200) - 100;
        offs[i] = (t % 4 == 0) ? 0 : int'($urandom % 41);
        for (int k = 0; k < M; k++) digs[i][k] = int'($urandom % 3) - 1;
      end
      fork
        drive(0, 0);
        drive(1, 0);
        drive(2, 0);
        begin
          while (n < M) begin
            @(posedge clk);
            if (out[0].v) begin
              if (n == 0) trel = cyc;
              for (int i = 0; i < N; i++) begin
                checks++;
                if (!out[i].v || int'(out[i].e) != exps[i] || int'(out[i].d) != digs[i][n]) begin
                  failures++;
                  $display("FAIL t=%0d digit %0d of input %0d", t, n, i);
                end
              end
              n++;
            end else begin
              for (int i = 0; i < N; i++) if (out[i].v) failures++;
            end
          end
        end
      join
      for (int i = 0; i < N; i++) if (tfirst[i] > tmax) tmax = tfirst[i];
      checks++;
      if (trel != tmax) begin
        failures++;
        $display("FAIL t=%0d release at %0d, latest first digit at %0d", t, trel, tmax);
      end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
