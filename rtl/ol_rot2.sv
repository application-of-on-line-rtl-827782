// ol_rot2: plane rotation of an operand pair by an on-line cosine/sine,
//     o1 = c*p - s*q        o2 = s*p + c*q
// the building block of both levels of the 2x2 two-sided rotation.  The
// four inputs are synchronized by one variable delay buffer, then four
// multipliers and an on-line subtractor and adder produce the results
// (EN1/EN2 drop the half that a diagonal processor does not need).  The
// products feed the subtractor/adder through their own buffers, since the
// multipliers' post-normalization may put them out of phase by up to two
// digits.  A new operand set enters the multipliers only once they have
// finished the previous one (the buffer waits for all of them to be idle).  On-line delay: multiplier (5..7) plus adder (5 and up).
// The arrangement follows the document's rotation networks; grouping them
// into this pair module is this design's own.
module ol_rot2
  import ol_pkg::*;
#(
  parameter int unsigned M     = OL_M,
  parameter int unsigned DEPTH = 128,
  parameter bit          EN1   = 1'b1,
  parameter bit          EN2   = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  ol_t  p,
  input  ol_t  q,
  input  ol_t  c,
  input  ol_t  s,
  output ol_t  o1,
  output ol_t  o2
);

  ol_t bin [4];
  ol_t bout[4];

  assign bin[0] = p;
  assign bin[1] = q;
  assign bin[2] = c;
  assign bin[3] = s;

  logic [3:0] mbusy;

  ol_vdb #(.N(4), .DEPTH(DEPTH), .M(M)) u_vdb (.clk, .rst_n, .in(bin), .ready(mbusy == '0), .out(bout));

  if (EN1) begin : g_o1
    ol_t cp, sq;
    ol_mul #(.M(M)) u_cp (.clk, .rst_n, .x(bout[2]), .y(bout[0]), .z(cp), .busy(mbusy[0]));
    ol_mul #(.M(M)) u_sq (.clk, .rst_n, .x(bout[3]), .y(bout[1]), .z(sq), .busy(mbusy[1]));
    ol_op2 #(.OP(OP_SUB), .M(M), .DEPTH(DEPTH)) u_sub (.clk, .rst_n, .a(cp), .b(sq), .z(o1));
  end else begin : g_no1
    assign o1 = OL_IDLE;
    assign mbusy[1:0] = 2'b00;
  end

  if (EN2) begin : g_o2
    ol_t sp, cq;
    ol_mul #(.M(M)) u_sp (.clk, .rst_n, .x(bout[3]), .y(bout[0]), .z(sp), .busy(mbusy[2]));
    ol_mul #(.M(M)) u_cq (.clk, .rst_n, .x(bout[2]), .y(bout[1]), .z(cq), .busy(mbusy[3]));
    ol_op2 #(.OP(OP_ADD), .M(M), .DEPTH(DEPTH)) u_add (.clk, .rst_n, .a(sp), .b(cq), .z(o2));
  end else begin : g_no2
    assign o2 = OL_IDLE;
    assign mbusy[3:2] = 2'b00;
  end

endmodule
