// Shared sizes and types of the 8x8 approximate Dadda multiplier.
// OP_W is the operand width and PROD_W the product width (2*OP_W). The
// reduction tree is drawn for exactly these sizes, so they are constants,
// not parameters. pp_array_t holds the partial products as pp[j][i] =
// b[j] & a[i], whose weight is 2**(i+j).
package dadda_pkg;
  localparam int unsigned OP_W   = 8;
  localparam int unsigned PROD_W = 2 * OP_W;

  typedef logic [OP_W-1:0]            operand_t;
  typedef logic [PROD_W-1:0]          product_t;
  typedef logic [OP_W-1:0][OP_W-1:0]  pp_array_t;
endpackage
