// offdiag_rot: rotation network of an off-diagonal processor, the full
// two-sided 2x2 rotation
//     u1 = cL a11 - sL a21    u2 = cL a12 - sL a22
//     u3 = sL a11 + cL a21    u4 = sL a12 + cL a22
//     b11 = cR u1 - sR u2     b12 = sR u1 + cR u2
//     b21 = cR u3 - sR u4     b22 = sR u3 + cR u4
// with sixteen on-line multipliers and eight adders/subtractors.  Inputs of
// each level are synchronized by variable delay buffers.  On-line delay
// about 24 cycles from the later of the angles to the outputs.
// Follows the document's network; the grouping into pair rotations is this
// design's own.
module offdiag_rot
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
  output ol_t  b12,
  output ol_t  b21,
  output ol_t  b22
);

  ol_t u1, u2, u3, u4;

  ol_rot2 #(.M(M), .DEPTH(DEPTH)) u_l1 (.clk, .rst_n, .p(a11), .q(a21), .c(cl), .s(sl), .o1(u1), .o2(u3));
  ol_rot2 #(.M(M), .DEPTH(DEPTH)) u_l2 (.clk, .rst_n, .p(a12), .q(a22), .c(cl), .s(sl), .o1(u2), .o2(u4));
  ol_rot2 #(.M(M), .DEPTH(DEPTH)) u_r1 (.clk, .rst_n, .p(u1), .q(u2), .c(cr), .s(sr), .o1(b11), .o2(b12));
  ol_rot2 #(.M(M), .DEPTH(DEPTH)) u_r2 (.clk, .rst_n, .p(u3), .q(u4), .c(cr), .s(sr), .o1(b21), .o2(b22));

endmodule
