// Feynman gate (FG), also called controlled-NOT: a 2-input, 2-output
// reversible gate mapping (a, b) to (p = a, q = a ^ b). With b tied to 0 it
// copies a onto two lines (fan-out in reversible logic). Combinational only.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
