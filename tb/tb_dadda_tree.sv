// Self-checking testbench for dadda_tree: all 65,536 operand pairs. The
// partial products are formed here, and the two output rows are checked
// against the reference model: row_s + row_c must equal the model's value,
// the carry row must be empty in columns 0-2 and the sum row in column 15.
// Whenever the model sees no compressor in error, the rows must add up to the
// exact product.
module tb_dadda_tree;
  import dadda_pkg::*;
  import tb_dadda_ref_pkg::*;
  pp_array_t pp;
  product_t  row_s, row_c;
  int checks = 0, failures = 0;
  int n_exact = 0;

  dadda_tree dut (.pp(pp), .row_s(row_s), .row_c(row_c));

  initial begin
    #100ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        ref_result_t r;
        int got;
        for (int j = 0; j < 8; j++)
          for (int i = 0; i < 8; i++)
            pp[j][i] = 1'(((ia >> i) & (ib >> j)) & 1);
        r = approx_mult(ia, ib);
        #1;
        got = int'(row_s) + int'(row_c);
        checks++;
        if (got != r.rows_sum) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d rows=%0d expected %0d", ia, ib, got, r.rows_sum);
        end
        checks++;
        if (row_c[2:0] != 3'b000 || row_s[15] != 1'b0) failures++;
        if (r.n_up + r.n_down == 0) begin
          n_exact++;
          checks++;
          if (got != ia * ib) failures++;
        end
      end
    end
    checks++;
    if (n_exact == 0) failures++;
    $display("operand pairs with no compressor error: %0d", n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
