// ol_op2: a two-operand on-line unit with its variable delay buffer in
// front: the operands a and b are synchronized by ol_vdb and then enter an
// adder, subtractor, multiplier or divider (OP).  For OP_DIV, a is the
// dividend and b the divisor; for OP_SUB the result is a - b.  Timing is
// the unit's on-line delay plus whatever wait the later operand imposes.
// This pairing of buffer and unit mirrors the buffered unit inputs of the
// on-line networks; the wrapper itself is this design's convenience.
module ol_op2
  import ol_pkg::*;
#(
  parameter op_e         OP    = OP_ADD,
  parameter int unsigned M     = OL_M,
  parameter int unsigned DEPTH = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  a,
  input  ol_t  b,
  output ol_t  z
);

  ol_t bin [2];
  ol_t bout[2];

  assign bin[0] = a;
  assign bin[1] = b;

  logic ubusy;

  ol_vdb #(.N(2), .DEPTH(DEPTH), .M(M)) u_vdb (.clk, .rst_n, .in(bin), .ready(!ubusy), .out(bout));

  if (OP == OP_ADD || OP == OP_SUB) begin : g_add
    ol_add #(.M(M), .SUB(OP == OP_SUB)) u_add (
      .clk, .rst_n, .x(bout[0]), .y(bout[1]), .z, .busy(ubusy), .shifted());
  end else if (OP == OP_MUL) begin : g_mul
    ol_mul #(.M(M)) u_mul (.clk, .rst_n, .x(bout[0]), .y(bout[1]), .z, .busy(ubusy));
  end else begin : g_div
    ol_div #(.M(M)) u_div (.clk, .rst_n, .n(bout[0]), .d(bout[1]), .q(z), .busy(ubusy));
  end

endmodule
