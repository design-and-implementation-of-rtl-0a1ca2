// Peres gate (PG): a 3-input, 3-output reversible gate.
// Maps (a, b, c) to (p = a, q = a ^ b, r = (a & b) ^ c). With c tied to 0 the
// gate is a half adder (q = sum, r = carry) and p is the garbage output.
// Purely combinational; no clock. The mapping is the standard Peres gate
// definition; the gate is used here as a logic cell, so the reversibility
// bookkeeping (ancilla inputs, garbage outputs) shows up only as unused outputs.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
