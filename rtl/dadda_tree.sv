// Two-stage partial-product reduction of the 8x8 approximate multiplier.
// It takes the 64 partial products and returns two 16-bit rows whose sum is
// the (approximate) product. Columns are numbered by weight, 0 to 15.
//
// Stage 1 splits the partial-product rows into two groups of four: rows 0-3
// (columns 0-10) and rows 4-7 (columns 4-14). Inside a group, with c the
// column counted from the group's lowest column, the heights are
// 1,2,3,4,4,4,4,4,3,2,1 and the cells are:
//   c = 0, 10  bit passes through
//   c = 1, 9   half adder
//   c = 2, 8   full adder
//   c = 3..7   approximate 4:2 compressor (no carry chain between columns)
// Every cell leaves its sum in its own column and its carry in the next, so
// a group leaves at most two bits per column.
//
// Stage 2 then holds, per column 0..14: 1,1,2,2,3,3,4,4,4,4,4,2,2,2,2 bits
// and reduces them with: columns 0-1 pass, 2-3 half adders, 4-5 full adders,
// 6-10 approximate 4:2 compressors, 11-14 half adders.
//
// The result (stage 3) is row_s (the sums and passed bits) and row_c (the
// carries, shifted one column up; row_c[0..2] are 0), added by the final
// adder. The cell in every column of both stages follows the design's dot
// diagram. Combinational only.
module dadda_tree
  import dadda_pkg::*;
(
  input  pp_array_t pp,
  output product_t  row_s,
  output product_t  row_c
);
  localparam int unsigned GCOLS = 11;   // columns spanned by one 4-row group

  // Stage-1 outputs, per group, in the group's local columns:
  //   s1_s[g][c]: sum (or passed bit) left in local column c
  //   s1_c[g][c]: carry arriving in local column c from column c-1
  logic [1:0][GCOLS-1:0] s1_s;
  logic [1:0][GCOLS-1:0] s1_c;

  // Bit of partial-product row r (0..3 within group g) that sits in the
  // group's local column c. Only used where it exists.
  for (genvar g = 0; g < 2; g++) begin : g_stage1
    logic [3:0][GCOLS-1:0] bits;   // bits[r][c]
    always_comb begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < GCOLS; c++)
          bits[r][c] = ((c - r) >= 0 && (c - r) < OP_W) ? pp[4*g + r][c - r] : 1'b0;
    end

    assign s1_c[g][0] = 1'b0;
    assign s1_c[g][1] = 1'b0;

    for (genvar c = 0; c < GCOLS; c++) begin : g_col
      if (c == 0) begin : g_pass_lo
        assign s1_s[g][c] = bits[0][c];
      end else if (c == GCOLS - 1) begin : g_pass_hi
        assign s1_s[g][c] = bits[3][c];
      end else if (c == 1) begin : g_ha_lo
        half_adder u_ha (.in1(bits[0][c]), .in2(bits[1][c]),
                         .sum(s1_s[g][c]), .carry(s1_c[g][c+1]));
      end else if (c == GCOLS - 2) begin : g_ha_hi
        half_adder u_ha (.in1(bits[2][c]), .in2(bits[3][c]),
                         .sum(s1_s[g][c]), .carry(s1_c[g][c+1]));
      end else if (c == 2) begin : g_fa_lo
        full_adder u_fa (.in1(bits[0][c]), .in2(bits[1][c]), .cin(bits[2][c]),
                         .sum(s1_s[g][c]), .carry(s1_c[g][c+1]));
      end else if (c == GCOLS - 3) begin : g_fa_hi
        full_adder u_fa (.in1(bits[1][c]), .in2(bits[2][c]), .cin(bits[3][c]),
                         .sum(s1_s[g][c]), .carry(s1_c[g][c+1]));
      end else begin : g_cmp
        approx_compressor u_cmp (.a1(bits[0][c]), .a2(bits[1][c]),
                                 .a3(bits[2][c]), .a4(bits[3][c]),
                                 .sum(s1_s[g][c]), .carry(s1_c[g][c+1]));
      end
    end
  end

  // Stage-2 input matrix, four rows by product column:
  //   m[0]: group-0 sums, m[1]: group-0 carries,
  //   m[2]: group-1 sums, m[3]: group-1 carries (both shifted up 4 columns).
  logic [3:0][PROD_W-1:0] m;
  always_comb begin
    m = '0;
    for (int k = 0; k < GCOLS; k++) begin
      m[0][k]     = s1_s[0][k];
      m[1][k]     = s1_c[0][k];
      m[2][k + 4] = s1_s[1][k];
      m[3][k + 4] = s1_c[1][k];
    end
  end

  assign row_c[0] = 1'b0;
  assign row_c[1] = 1'b0;
  assign row_c[2] = 1'b0;

  for (genvar k = 0; k < PROD_W - 1; k++) begin : g_stage2
    if (k <= 1) begin : g_pass
      assign row_s[k] = m[0][k];
    end else if (k <= 3) begin : g_ha_lo
      half_adder u_ha (.in1(m[0][k]), .in2(m[1][k]),
                       .sum(row_s[k]), .carry(row_c[k+1]));
    end else if (k <= 5) begin : g_fa
      full_adder u_fa (.in1(m[0][k]), .in2(m[1][k]), .cin(m[2][k]),
                       .sum(row_s[k]), .carry(row_c[k+1]));
    end else if (k <= 10) begin : g_cmp
      approx_compressor u_cmp (.a1(m[0][k]), .a2(m[1][k]),
                               .a3(m[2][k]), .a4(m[3][k]),
                               .sum(row_s[k]), .carry(row_c[k+1]));
    end else begin : g_ha_hi
      half_adder u_ha (.in1(m[2][k]), .in2(m[3][k]),
                       .sum(row_s[k]), .carry(row_c[k+1]));
    end
  end

  assign row_s[PROD_W-1] = 1'b0;
endmodule
