// Reference model of the approximate 8x8 Dadda multiplier, for testbenches.
// It walks the same dot diagram as the design but works with bit counts:
// half and full adders add exactly, and a 4:2 compressor returns the number
// of ones at its inputs, one too high for a1a2a3a4 = 0100 / 1000 and one too
// low for 0011 / 1111. Inputs are assigned to compressor pins in the same
// order as in the design (stage 1: partial-product rows in order; stage 2:
// group-0 sum, group-0 carry, group-1 sum, group-1 carry).
package tb_dadda_ref_pkg;

  typedef struct {
    int rows_sum;     // value of row_s + row_c (before the final adder)
    int product;      // 16-bit result
    int n_up;         // compressors that read one too high
    int n_down;       // compressors that read one too low
    int err_weight;   // sum of column weights of all compressors in error
  } ref_result_t;

  function automatic int cmp_value(int a1, int a2, int a3, int a4, ref int up, ref int down);
    int v;
    v = a1 + a2 + a3 + a4;
    if ((a1 + a2) == 1 && a3 == 0 && a4 == 0) begin v += 1; up++; end
    else if (a1 == a2 && a3 == 1 && a4 == 1) begin v -= 1; down++; end
    return v;
  endfunction

  function automatic ref_result_t approx_mult(int a, int b);
    ref_result_t res;
    int pp[8][8];
    int s1s[2][11], s1c[2][12];
    int m[4][16];
    int rs[16], rc[17];
    int up, down, v;
    res.n_up = 0; res.n_down = 0; res.err_weight = 0;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++)
        pp[j][i] = ((a >> i) & 1) * ((b >> j) & 1);
    // stage 1, two groups of four partial-product rows
    for (int g = 0; g < 2; g++) begin
      for (int c = 0; c < 12; c++) s1c[g][c] = 0;
      for (int c = 0; c < 11; c++) begin
        int bit_rc[4];
        for (int r = 0; r < 4; r++)
          bit_rc[r] = (c - r >= 0 && c - r < 8) ? pp[4*g + r][c - r] : 0;
        up = 0; down = 0;
        if (c >= 3 && c <= 7)
          v = cmp_value(bit_rc[0], bit_rc[1], bit_rc[2], bit_rc[3], up, down);
        else
          v = bit_rc[0] + bit_rc[1] + bit_rc[2] + bit_rc[3];
        if (up + down > 0) res.err_weight += 1 << (c + 4*g);
        res.n_up += up; res.n_down += down;
        s1s[g][c] = v % 2;
        s1c[g][c+1] = v / 2;
      end
    end
    for (int k = 0; k < 16; k++)
      for (int r = 0; r < 4; r++) m[r][k] = 0;
    for (int k = 0; k < 11; k++) begin
      m[0][k] = s1s[0][k];     m[1][k] = s1c[0][k];
      m[2][k+4] = s1s[1][k];   m[3][k+4] = s1c[1][k];
    end
    // stage 2
    for (int k = 0; k < 17; k++) rc[k] = 0;
    for (int k = 0; k < 16; k++) begin
      up = 0; down = 0;
      if (k >= 6 && k <= 10)
        v = cmp_value(m[0][k], m[1][k], m[2][k], m[3][k], up, down);
      else
        v = m[0][k] + m[1][k] + m[2][k] + m[3][k];
      if (up + down > 0) res.err_weight += 1 << k;
      res.n_up += up; res.n_down += down;
      rs[k] = v % 2;
      rc[k+1] = v / 2;
    end
    res.rows_sum = 0;
    for (int k = 0; k < 16; k++) res.rows_sum += (rs[k] + rc[k]) << k;
    res.rows_sum += rc[16] << 16;
    res.product = res.rows_sum % 65536;
    return res;
  endfunction

endpackage
