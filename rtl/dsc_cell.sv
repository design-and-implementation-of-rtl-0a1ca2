// Basic building block of the modified dual-stage 4:2 compressor.
// Four bits of equal weight go in; two complemented outputs come out:
//   carry_n = NOR(a1, a2)
//   sel     = a1 XOR a2
//   sum_n   = sel ? NAND(a3, a4) : NOR(a3, a4)     (2:1 multiplexer)
// The gate set (one XOR, NAND and NOR gates in place of AND and OR, and a
// multiplexer) and the gate-to-input wiring follow the design; using NAND/NOR
// saves transistors and returns the outputs inverted. Which multiplexer data
// input is taken for sel = 1 is this design's choice: the one that makes
// ~carry_n*2 + ~sum_n closest to the number of ones at the inputs.
// Combinational only.
module dsc_cell (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  output logic carry_n,
  output logic sum_n
);
  logic sel, nand34, nor34;

  always_comb begin
    carry_n = ~(a1 | a2);
    sel     = a1 ^ a2;
    nand34  = ~(a3 & a4);
    nor34   = ~(a3 | a4);
    sum_n   = sel ? nand34 : nor34;
  end
endmodule
