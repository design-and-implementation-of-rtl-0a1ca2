// Full adder built from three Feynman gates and one Fredkin gate.
//   FG1 (in1, in2)      -> in1 and the propagate bit p = in1 ^ in2
//   FG2 (cin, 0)        -> two copies of cin (fan-out)
//   FG3 (p, cin)        -> p and sum = p ^ cin
//   FRG (p, in1, cin)   -> carry = p ? cin : in1
// so sum = in1 ^ in2 ^ cin and carry = (in1 ^ in2)&cin | in1&in2.
// The gate count (3 FG + 1 FRG, one ancilla 0) follows the reversible full
// adder this design is based on; which gate output carries the sum and which
// the carry is chosen here so that the outputs meet the sum and carry
// equations. Unused gate outputs are garbage. Combinational only.
module full_adder (
  input  logic in1,
  input  logic in2,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic in1_c, prop, cin_a, cin_b, prop_c, g_ctrl, g_spare;

  feynman_gate u_fg1 (.a(in1),  .b(in2),  .p(in1_c),  .q(prop));
  feynman_gate u_fg2 (.a(cin),  .b(1'b0), .p(cin_a),  .q(cin_b));
  feynman_gate u_fg3 (.a(prop), .b(cin_a), .p(prop_c), .q(sum));
  fredkin_gate u_frg (
    .a(prop_c), .b(in1_c), .c(cin_b),
    .p(g_ctrl), .q(carry), .r(g_spare)
  );
endmodule
