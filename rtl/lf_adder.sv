// Ladner-Fischer parallel-prefix adder, WIDTH bits, no carry-in.
// Pre-processing:  p[i] = a[i] ^ b[i],  g[i] = a[i] & b[i].
// Carry generation: log2(WIDTH) prefix levels over the odd bit positions.
//   At level l every odd position i whose bit l is set merges its group with
//   the group ending at j = (i with its low l bits cleared) - 1:
//     G = G_i | P_i & G_j,   P = P_i & P_j
//   (a black cell; when the group reaches bit 0 only G is needed, a gray
//   cell). For WIDTH = 8 this forms 1:0, 3:2, 5:4, 7:6, then 3:0, 7:4, then
//   5:0, 7:0. One last gray level gives the even positions:
//   G[i:0] = g[i] | p[i] & G[i-1:0].
// Post-processing:  s[i] = p[i] ^ G[i-1:0],  s[0] = p[0],  cout = G[WIDTH-1:0].
// The stages, the cell equations and the 8-bit prefix tree follow the design;
// the rule that extends the tree to other widths is this design's own.
// Combinational only.
module lf_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p, g;       // bit propagate / generate
  logic [WIDTH-1:0] gp, pp;     // group generate / propagate after the tree
  logic [WIDTH-1:0] gn, pn;     // next-level values
  logic [WIDTH-1:0] c;          // c[i] = carry out of bit i = G[i:0]

  always_comb begin
    p  = a ^ b;
    g  = a & b;
    gp = g;
    pp = p;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      gn = gp;
      pn = pp;
      for (int unsigned i = 1; i < WIDTH; i += 2) begin
        if (((i >> l) & 1) == 1) begin
          int unsigned j;
          j = ((i >> l) << l) - 1;
          gn[i] = gp[i] | (pp[i] & gp[j]);
          pn[i] = pp[i] & pp[j];
        end
      end
      gp = gn;
      pp = pn;
    end
    c = gp;
    for (int unsigned i = 2; i < WIDTH; i += 2)
      c[i] = g[i] | (p[i] & c[i-1]);
    sum[0] = p[0];
    for (int unsigned i = 1; i < WIDTH; i++)
      sum[i] = p[i] ^ c[i-1];
    cout = c[WIDTH-1];
  end
endmodule
