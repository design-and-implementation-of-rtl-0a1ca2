// End-to-end testbench for dadda_mult_8x8 at its only size (8x8), with no
// parameter overrides. It applies all 65,536 operand pairs and checks y:
//   - against the reference model of the approximate dot diagram;
//   - against the exact product a*b when no compressor is in error, and
//     within the summed column weights of the erring compressors otherwise.
// It counts how often each approximation mechanism fires (a compressor reading
// one too high, one too low, and products that come out exact / inexact) and
// fails if any of them never happens. It prints the error statistics of the
// multiplier: error rate, mean error distance (MED) and mean relative error
// distance (MRED, over nonzero exact products).
module tb_dadda_mult_8x8;
  import dadda_pkg::*;
  import tb_dadda_ref_pkg::*;
  operand_t a, b;
  product_t y;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_exact = 0, n_inexact = 0, n_wrapped = 0;
  real sum_ed = 0.0, sum_red = 0.0;
  int max_ed = 0;

  dadda_mult_8x8 dut (.a(a), .b(b), .y(y));

  initial begin
    #100ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // A few directed pairs first whose products are exact: a zero operand
    // leaves every partial product 0, and 1*1, 128*128 set a single one in a
    // column (0 and 14) where no compressor sits.
    static int directed[5][2] = '{'{0, 0}, '{255, 0}, '{0, 255}, '{1, 1}, '{128, 128}};
    foreach (directed[n]) begin
      a = operand_t'(directed[n][0]);
      b = operand_t'(directed[n][1]);
      #1;
      checks++;
      if (int'(y) != directed[n][0] * directed[n][1]) begin
        failures++;
        $display("FAIL directed %0d*%0d got %0d", directed[n][0], directed[n][1], y);
      end
    end

    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        ref_result_t r;
        int exact, ed;
        a = operand_t'(ia);
        b = operand_t'(ib);
        r = approx_mult(ia, ib);
        exact = ia * ib;
        #1;
        checks++;
        if (int'(y) != r.product) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d y=%0d model=%0d", ia, ib, y, r.product);
        end
        if (r.rows_sum != r.product) n_wrapped++;
        ed = (r.rows_sum > exact) ? r.rows_sum - exact : exact - r.rows_sum;
        checks++;
        if (r.n_up + r.n_down == 0) begin
          if (int'(y) != exact) failures++;
        end else begin
          if (ed > r.err_weight) failures++;
        end
        n_up   += r.n_up;
        n_down += r.n_down;
        if (int'(y) == exact) n_exact++; else n_inexact++;
        ed = (int'(y) > exact) ? int'(y) - exact : exact - int'(y);
        if (ed > max_ed) max_ed = ed;
        sum_ed += real'(ed);
        if (exact != 0) sum_red += real'(ed) / real'(exact);
      end
    end

    checks++;
    if (n_up == 0) begin failures++; $display("FAIL no compressor ever read high"); end
    checks++;
    if (n_down == 0) begin failures++; $display("FAIL no compressor ever read low"); end
    checks++;
    if (n_exact == 0 || n_inexact == 0) begin failures++; $display("FAIL exact/inexact not both seen"); end

    $display("compressor events: %0d high, %0d low", n_up, n_down);
    $display("products: %0d exact, %0d inexact (error rate %0.2f%%), %0d wrapped past 16 bits",
             n_exact, n_inexact, 100.0 * n_inexact / 65536.0, n_wrapped);
    $display("MED = %0.2f, MRED = %0.4f%%, max error distance = %0d",
             sum_ed / 65536.0, 100.0 * sum_red / 65025.0, max_ed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
