// diag_proc: main-diagonal processor of the SVD array.  It holds a 2x2
// block on the main diagonal, computes the left and right rotation angles
// of the block (fhsvd_angle), sends them out to its row and column, and
// rotates its own block with them (diag_rot).  The rotated block is
// diagonal: b12 and b21 leave as the operand zero, in step with b11.
// Interface: four block elements in, four out, the two angle pairs out,
// all as on-line operands; one operation per iteration.  From the arrival
// of the block the angles leave after about 80 cycles and the block after
// about 105.  The split into angle and rotation networks follows the
// document; sending the zero elements on is this design's choice.
module diag_proc
  import ol_pkg::*;
#(
  parameter int unsigned M     = OL_M,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned EPS_K = 50
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  a11,
  input  ol_t  a12,
  input  ol_t  a21,
  input  ol_t  a22,
  output ol_t  b11,
  output ol_t  b12,
  output ol_t  b21,
  output ol_t  b22,
  output ol_t  cl,
  output ol_t  sl,
  output ol_t  cr,
  output ol_t  sr,
  output logic [1:0] eps_hit
);

  fhsvd_angle #(.M(M), .DEPTH(DEPTH), .EPS_K(EPS_K)) u_ang (
    .clk, .rst_n, .a11, .a12, .a21, .a22, .cl, .sl, .cr, .sr, .eps_hit);

  diag_rot #(.M(M), .DEPTH(DEPTH)) u_rot (
    .clk, .rst_n, .a11, .a12, .a21, .a22, .cl, .sl, .cr, .sr, .b11, .b22);

  ol_const #(.M(M), .CE(ZERO_EXP), .D1(2'sd0)) u_z12 (.clk, .rst_n, .trig(b11.v), .out(b12));
  ol_const #(.M(M), .CE(ZERO_EXP), .D1(2'sd0)) u_z21 (.clk, .rst_n, .trig(b11.v), .out(b21));

endmodule
