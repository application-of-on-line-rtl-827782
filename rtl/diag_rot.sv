// diag_rot: rotation network of a main-diagonal processor.  With the
// left angle (cL, sL) and the right angle (cR, sR) computed in the same
// processor, it forms only the two diagonal elements of the rotated block:
//     u1 = cL a11 - sL a21    u2 = cL a12 - sL a22
//     u3 = sL a11 + cL a21    u4 = sL a12 + cL a22
//     a11' = cR u1 - sR u2    a22' = sR u3 + cR u4
// (the off-diagonal elements of the result are zero by the choice of the
// angles).  Twelve on-line multipliers and six adders/subtractors; each
// level's six inputs are synchronized by variable delay buffers.
// Interface: on-line operands; the block elements are held in the buffers
// until the angles arrive.  On-line delay about 24 cycles from the later of
// the angles to the outputs.
// Follows the document's network; the grouping into pair rotations is this
// design's own.
module diag_rot
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
  input  ol_t  cl,
  input  ol_t  sl,
  input  ol_t  cr,
  input  ol_t  sr,
  output ol_t  b11,
  output ol_t  b22
);

  ol_t u1, u2, u3, u4;

  // left rotation, columns (a11,a21) and (a12,a22)
  ol_rot2 #(.M(M), .DEPTH(DEPTH)) u_l1 (.clk, .rst_n, .p(a11), .q(a21), .c(cl), .s(sl), .o1(u1), .o2(u3));
  ol_rot2 #(.M(M), .DEPTH(DEPTH)) u_l2 (.clk, .rst_n, .p(a12), .q(a22), .c(cl), .s(sl), .o1(u2), .o2(u4));
  // right rotation, rows (u1,u2) and (u3,u4); only the diagonal results
  ol_rot2 #(.M(M), .DEPTH(DEPTH), .EN2(1'b0)) u_r1 (.clk, .rst_n, .p(u1), .q(u2), .c(cr), .s(sr), .o1(b11), .o2());
  ol_rot2 #(.M(M), .DEPTH(DEPTH), .EN1(1'b0)) u_r2 (.clk, .rst_n, .p(u3), .q(u4), .c(cr), .s(sr), .o1(), .o2(b22));

endmodule
