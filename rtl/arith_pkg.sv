// Shared definitions for the carry-save arithmetic arrays.
//
// The four-function array is steered by two control lines, y and x:
// y selects the operation family (0: multiply/divide, 1: square/square-root)
// and x selects add (0) or two's-complement subtract (1) within the family.
// The enum below packs them as {y, x}, so its encoding is the truth table
// of the four operations.
package arith_pkg;

  typedef enum logic [1:0] {
    OP_MUL  = 2'b00,   // y=0 x=0 : s = a + b*p
    OP_DIV  = 2'b01,   // y=0 x=1 : q = a / b, s = remainder
    OP_SQR  = 2'b10,   // y=1 x=0 : s = a + f*f
    OP_SQRT = 2'b11    // y=1 x=1 : r = sqrt(a), s = a - r*r
  } op_e;

  function automatic logic op_x(op_e op);
    return op[0];
  endfunction

  function automatic logic op_y(op_e op);
    return op[1];
  endfunction

endpackage
