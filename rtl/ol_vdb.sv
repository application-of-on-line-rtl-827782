// ol_vdb: variable delay buffer.  Synchronizes N on-line operands that
// arrive out of phase (after a cancellation in an adder, or over paths of
// different on-line delay) so that the unit behind it sees their digits in
// lock-step.
//
// Each input has a FIFO of DEPTH digits (exponent and digit).  A set of N
// digits is released in the first cycle in which every input has a digit,
// either waiting in its FIFO or arriving in that very cycle; an input whose
// FIFO is empty passes straight through, so operands that are already in
// phase see no extra delay.  Once the latest operand has started, the
// outputs run one digit per cycle with it.  DEPTH must cover the largest
// phase difference.  In the array a rotation buffer may hold a whole
// operand (M digits) waiting for late angles while the first digits of the
// next iteration's operand already come in from a neighbour that is one
// iteration ahead, hence the default 128 (>= 2M).
// The first digit of a new operand set is released only when `ready` is
// high (the units behind have finished their previous operation); the
// digits of an operand set already started are never held back.
// The document gives the purpose of these buffers; their organisation as
// per-input FIFOs with a common release is this design's own.
module ol_vdb
  import ol_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned M     = OL_M
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  in  [N],
  input  logic ready,      // the units behind may take a new operand
  output ol_t  out [N]
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    exp_t   e;
    digit_t d;
  } ent_t;

  ent_t            mem  [N][DEPTH];
  logic [AW-1:0]   rp   [N];
  logic [AW-1:0]   wp   [N];
  logic [AW:0]     cnt  [N];
  logic            fire;
  logic [N-1:0]    avail, push, pop;
  logic [$clog2(M)-1:0] rel;            // digits of the current operand released

  always_comb begin
    for (int i = 0; i < int'(N); i++) avail[i] = (cnt[i] != 0) || in[i].v;
    fire = (&avail) && ((rel != '0) || ready);
    for (int i = 0; i < int'(N); i++) begin
      pop[i]  = fire && (cnt[i] != 0);
      push[i] = in[i].v && !(fire && cnt[i] == 0);
    end
    for (int i = 0; i < int'(N); i++) begin
      out[i].v = fire;
      if (cnt[i] != 0) begin
        out[i].e = mem[i][rp[i]].e;
        out[i].d = mem[i][rp[i]].d;
      end else begin
        out[i].e = in[i].e;
        out[i].d = in[i].d;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rel <= '0;
      for (int i = 0; i < int'(N); i++) begin
        rp[i]  <= '0;
        wp[i]  <= '0;
        cnt[i] <= '0;
      end
    end else begin
      if (fire) rel <= (rel == ($clog2(M))'(M - 1)) ? '0 : rel + 1'b1;
      for (int i = 0; i < int'(N); i++) begin
        if (push[i]) wp[i] <= (wp[i] == AW'(DEPTH - 1)) ? '0 : wp[i] + 1'b1;
        if (pop[i]) rp[i] <= (rp[i] == AW'(DEPTH - 1)) ? '0 : rp[i] + 1'b1;
        cnt[i] <= cnt[i] + (AW+1)'(push[i]) - (AW+1)'(pop[i]);
      end
    end
  end

  // buffer storage, no reset needed (read only after a write)
  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(N); i++)
      if (push[i]) mem[i][wp[i]] <= '{e: in[i].e, d: in[i].d};
  end

  for (genvar i = 0; i < N; i++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(in[i].v && !fire && cnt[i] == (AW+1)'(DEPTH)));
  end

endmodule
