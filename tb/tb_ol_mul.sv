// tb_ol_mul: self-checking testbench of ol_mul.
// Checks products of random operands.
// Operands are random quasi-normalized values, partly recoded into
// redundant signed digits; the result operand is converted back to a real
// and compared with the real-arithmetic result within a few units in the
// last place.  The latency must be 5 cycles plus one per post-normalization merge (at most 3), read from the result exponent.
// Some operations are driven with random gaps between digits to exercise
// stalling; their latency is not checked.  A watchdog ends a hung run.
module tb_ol_mul;
  import ol_pkg::*;
  import ol_tb_pkg::*;

  localparam int M    = 56;
  localparam int NOPS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ol_t x, y, z;
  int  checks = 0, failures = 0;
  int  cyc = 0;
  always @(posedge clk) cyc++;

  ol_mul #(.M(M)) dut (.clk, .rst_n, .x, .y, .z, .busy());

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one operation and collect its result
  task automatic run_op(input opnd_t oa, input opnd_t ob, input bit gaps,
                        output opnd_t oz, output int lat);
    int t0 = -1, t1 = -1, n = 0;
    oz.d = new[M];
    fork
      begin
        for (int k = 0; k < M; k++) begin
          @(negedge clk);
          while (gaps && k > 0 && ($urandom % 5) == 0) begin
            x = OL_IDLE; y = OL_IDLE;
            @(negedge clk);
          end
          x = '{v: 1'b1, e: exp_t'(oa.e), d: digit_t'(oa.d[k])};
          y = '{v: 1'b1, e: exp_t'(ob.e), d: digit_t'(ob.d[k])};
        end
        @(negedge clk);
        x = OL_IDLE; y = OL_IDLE;
      end
      begin
        while (n < M) begin
          @(posedge clk);
          if (x.v && t0 < 0) t0 = cyc;
          if (z.v) begin
            if (n == 0) begin t1 = cyc; oz.e = int'(z.e); end
            else if (int'(z.e) != oz.e) begin
              failures++;
              $display("exponent changed inside an operand");
            end
            oz.d[n] = int'(z.d);
            n++;
          end
        end
      end
    join
    lat = t1 - t0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    opnd_t oa, ob, oz;
    real   a, b, ref_v, got, tol;
    int    lat, exp_lat, extra, hits_min = 0, hits_shift = 0;
    bit    gaps;
    x = OL_IDLE; y = OL_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      gaps = (i % 7) == 6;
      a = rand_val(-3, 3);
      b = rand_val(-3, 3);
      oa = from_real(a, M, 30);
      ob = from_real(b, M, 30);
      a = to_real(oa); b = to_real(ob);
      ref_v = a * b;
      run_op(oa, ob, gaps, oz, lat);
      got = to_real(oz);
      tol = 2.0 ** (oz.e - M + 2);
      extra = (oa.e + ob.e + 1) - oz.e;
      exp_lat = 5 + extra;
      checks++;
      if (extra < 0 || extra > 3) begin failures++; $display("FAIL op %0d: %0d merges", i, extra); end
      checks++;
      if (fabs(got - ref_v) > tol + fabs(ref_v) * (2.0 ** -50)) begin
        failures++;
        $display("FAIL op %0d: a=%g b=%g got=%g expected=%g diff=%g tol=%g e=%0d", i, a, b, got, ref_v, got - ref_v, tol, oz.e);
      end
      if (!gaps && ref_v != 0.0) begin
        checks++;
        if (lat != exp_lat) begin
          failures++;
          $display("FAIL op %0d: latency %0d expected %0d", i, lat, exp_lat);
        end
        if (extra == 0) hits_min++; else hits_shift++;
      end
    end
    $display("cases at minimum latency: %0d, with extra latency: %0d", hits_min, hits_shift);
    checks++;
    if (hits_min == 0 || hits_shift == 0) begin
      failures++;
      $display("FAIL: both latency cases should occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
