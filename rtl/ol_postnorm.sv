// ol_postnorm: post-normalization stage shared by the on-line adder,
// multiplier and divider.
//
// The arithmetic core delivers raw result digits z1, z2, ... one per valid
// cycle.  The stage holds the first digit z1' and looks at the next one z2'.
// If (z1',z2') is (1,0), (1,1), (-1,0) or (-1,-1) the result is
// quasi-normalized and the held digit is sent out, followed by every later
// raw digit one step late.  Otherwise the two digits are merged as
// z1' = 2*z1' + z2' (always again a single digit), the exponent is
// decremented and the next raw digit is examined.  After MAXSHIFT merges the
// held digit is sent out whatever it is (the multiplier and the divider stop
// after a bounded number of leading zeros).  With ZERO_OUT set, exhausting
// the merges means the result is zero: all digits go out as 0 with the zero
// exponent (the adder under total cancellation).
//
// Timing: a digit leaves in the cycle in which the next raw digit arrives, so
// the stage adds one cycle of on-line delay plus one per merge.  Exactly M
// digits leave; `done` is high with the last one.  `start` loads the
// unnormalized exponent and must come before or with the first raw digit.
// The merge rule and the limits follow the post-normalization procedure of
// the on-line algorithms; the interface signals are this design's own.
module ol_postnorm
  import ol_pkg::*;
#(
  parameter int unsigned M        = OL_M,
  parameter int unsigned MAXSHIFT = 2,
  parameter bit          ZERO_OUT = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,     // begin a result, e_raw valid
  input  exp_t   e_raw,     // exponent before normalization
  input  logic   rv,        // raw digit valid
  input  digit_t rd,        // raw digit
  output ol_t    z,         // normalized output stream
  output logic   done,      // last output digit leaves this cycle
  output logic   shifted    // the current result needed at least one merge
);

  typedef enum logic [1:0] {S_IDLE, S_FIRST, S_WAIT, S_EMIT} st_e;
  st_e st;

  digit_t h;                          // held digit z1'
  exp_t   ex;                         // running exponent
  logic   zero_q;                     // result forced to zero
  logic [$clog2(M+2)-1:0] nsh;        // merges so far
  logic [$clog2(M+1)-1:0] cnt;        // digits sent

  logic norm, emit_now, force_zero;
  digit_t merged;

  always_comb begin
    norm       = (h != 2'sd0) && ((rd == 2'sd0) || (rd == h));
    merged     = digit_t'(2 * int'(h) + int'(rd));
    force_zero = ZERO_OUT && !norm && (nsh == ($clog2(M+2))'(MAXSHIFT)) && (merged == 2'sd0);
    emit_now   = rv && ((st == S_EMIT) ||
                        ((st == S_WAIT) && (norm || nsh == ($clog2(M+2))'(MAXSHIFT))));
    z.v        = emit_now;
    z.e        = (zero_q || (st == S_WAIT && force_zero)) ? ZERO_EXP : ex;
    z.d        = (zero_q || (st == S_WAIT && force_zero)) ? 2'sd0 : h;
    done       = emit_now && (cnt == ($clog2(M+1))'(M - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      h       <= '0;
      ex      <= '0;
      nsh     <= '0;
      cnt     <= '0;
      zero_q  <= 1'b0;
      shifted <= 1'b0;
    end else begin
      if (start) begin
        st      <= S_FIRST;
        ex      <= e_raw;
        nsh     <= '0;
        cnt     <= '0;
        zero_q  <= 1'b0;
        shifted <= 1'b0;
      end
      if (rv) begin
        unique case (st)
          S_FIRST: begin
            h  <= rd;
            st <= S_WAIT;
          end
          S_WAIT: begin
            if (emit_now) begin
              h      <= rd;
              st     <= S_EMIT;
              cnt    <= 1;
              zero_q <= force_zero;
            end else begin
              h       <= merged;
              nsh     <= nsh + 1'b1;
              ex      <= sat_exp(16'(ex) - 16'sd1);
              shifted <= 1'b1;
            end
          end
          S_EMIT: begin
            h   <= rd;
            cnt <= cnt + 1'b1;
            if (done) st <= S_IDLE;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
