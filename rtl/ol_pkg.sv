// ol_pkg: shared types and constants of the radix-2 floating-point on-line
// arithmetic used by the SVD processor array.
//
// A floating-point on-line operand travels on 10 wires per cycle: an 8-bit
// two's-complement exponent, held steady for the whole operand, and one
// radix-2 signed mantissa digit in {-1,0,1}, most significant digit first.
// The value is  sum_{i=1..M} d_i 2^-i * 2^e.  A valid bit marks the cycles
// that carry a digit.  Operands are quasi-normalized, |mantissa| in [1/4,1).
// The exponent width (8) and the mantissa length (56 digits) follow the
// double-precision format used throughout the design; the valid bit, the
// digit encoding and the zero marker (exponent -128) are this design's choice.
package ol_pkg;

  localparam int unsigned OL_M  = 56;  // mantissa digits per operand
  localparam int unsigned OL_EW = 8;   // exponent bits

  typedef logic signed [OL_EW-1:0] exp_t;
  // signed digit, two's complement: 2'b01 = +1, 2'b00 = 0, 2'b11 = -1
  typedef logic signed [1:0]       digit_t;

  typedef struct packed {
    logic   v;   // a digit is present this cycle
    exp_t   e;   // exponent of the operand
    digit_t d;   // mantissa digit
  } ol_t;

  localparam exp_t ZERO_EXP = exp_t'(-128);  // exponent used for the value zero
  localparam exp_t EXP_MAX  = exp_t'(127);

  localparam ol_t OL_IDLE = '{v: 1'b0, e: '0, d: '0};

  // Saturate a wide exponent into the 8-bit range; underflow becomes the
  // zero marker, so a vanishing operand never wraps to a huge exponent.
  function automatic exp_t sat_exp(input logic signed [15:0] x);
    if (x > 16'sd127)       return EXP_MAX;
    else if (x < -16'sd128) return ZERO_EXP;
    else                    return exp_t'(x);
  endfunction

  typedef enum logic [1:0] {OP_ADD, OP_SUB, OP_MUL, OP_DIV} op_e;

endpackage
