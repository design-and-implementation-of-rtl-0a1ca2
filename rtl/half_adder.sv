// Half adder built from a single Peres gate with its third input held at 0
// (one ancilla input): sum = in1 ^ in2, carry = in1 & in2. The gate's first
// output (a copy of in1) is the garbage output and is left unused.
// Combinational only; used as the two-bit cell of the reduction tree.
module half_adder (
  input  logic in1,
  input  logic in2,
  output logic sum,
  output logic carry
);
  logic garbage;

  peres_gate u_pg (
    .a(in1), .b(in2), .c(1'b0),
    .p(garbage), .q(sum), .r(carry)
  );
endmodule
