// 8x8 unsigned approximate Dadda multiplier, y ~= a * b.
// Three steps, all combinational:
//   1. pp_gen      forms the 64 partial products (AND array);
//   2. dadda_tree  reduces them to two rows in two stages of half adders,
//                  full adders and approximate 4:2 compressors;
//   3. lf_adder    adds the two rows with a 16-bit Ladner-Fischer
//                  parallel-prefix adder. Its carry-out is dropped: for
//                  every operand pair the two rows add up to less than
//                  2**16, which an assertion checks in simulation.
// The compressors make the product approximate: each one can be off by one
// unit of its column weight, so y differs from a*b for some operand pairs.
// The structure follows the design's dot diagram and adder choice; treating
// the operands as unsigned and keeping 16 product bits is this design's
// reading. No clock or reset: y settles one combinational delay after a, b.
module dadda_mult_8x8
  import dadda_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t y
);
  pp_array_t pp;
  product_t  row_s, row_c;
  logic      add_cout;

  pp_gen u_pp (.a(a), .b(b), .pp(pp));

  dadda_tree u_tree (.pp(pp), .row_s(row_s), .row_c(row_c));

  lf_adder #(.WIDTH(PROD_W)) u_add (
    .a(row_s), .b(row_c), .sum(y), .cout(add_cout)
  );

  // The 16-bit product never overflows, so the final carry-out must be 0.
  always_comb begin
    assert (add_cout == 1'b0) else $error("dadda_mult_8x8: product overflowed 16 bits");
  end
endmodule
