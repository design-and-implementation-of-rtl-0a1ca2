// Fredkin gate (FRG): a 3-input, 3-output controlled swap. The control a
// passes straight through as p. When a = 0 the data lines pass unchanged
// (q = b, r = c); when a = 1 they are exchanged (q = c, r = b):
//   q = ~a&b | a&c,   r = ~a&c | a&b.
// This is the standard Fredkin definition; it is what the full adder uses to
// pick its carry. Combinational only.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
