// offdiag_proc: off-diagonal processor of the SVD array.  It rotates its
// 2x2 block from the left with the angle of its row and from the right with
// the angle of its column (offdiag_rot), and passes both angles on to the
// next processor away from the diagonal one cycle later (one register
// stage, the document's one-cycle pass-through delay).
// Interface: on-line operands; one operation per iteration.  The block
// waits in the rotation network's buffers until both angles have arrived.
module offdiag_proc
  import ol_pkg::*;
#(
  parameter int unsigned M     = OL_M,
  parameter int unsigned DEPTH = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  a11,
  input  ol_t  a12,
  input  ol_t  a21,
  input  ol_t  a22,
  input  ol_t  cl_in,
  input  ol_t  sl_in,
  input  ol_t  cr_in,
  input  ol_t  sr_in,
  output ol_t  b11,
  output ol_t  b12,
  output ol_t  b21,
  output ol_t  b22,
  output ol_t  cl_out,
  output ol_t  sl_out,
  output ol_t  cr_out,
  output ol_t  sr_out
);

  offdiag_rot #(.M(M), .DEPTH(DEPTH)) u_rot (
    .clk, .rst_n, .a11, .a12, .a21, .a22,
    .cl(cl_in), .sl(sl_in), .cr(cr_in), .sr(sr_in), .b11, .b12, .b21, .b22);

  ol_fdb #(.DELAY(1)) u_pcl (.clk, .rst_n, .in(cl_in), .out(cl_out));
  ol_fdb #(.DELAY(1)) u_psl (.clk, .rst_n, .in(sl_in), .out(sl_out));
  ol_fdb #(.DELAY(1)) u_pcr (.clk, .rst_n, .in(cr_in), .out(cr_out));
  ol_fdb #(.DELAY(1)) u_psr (.clk, .rst_n, .in(sr_in), .out(sr_out));

endmodule
