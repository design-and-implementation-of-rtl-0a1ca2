// Self-checking testbench for pp_gen: every operand pair (65,536). Each
// partial-product row j must equal a when bit j of b is set and 0 otherwise,
// and the rows weighted by 2**j must add up to the exact product a*b.
module tb_pp_gen;
  import dadda_pkg::*;
  operand_t  a, b;
  pp_array_t pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

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
        int total;
        a = operand_t'(ia);
        b = operand_t'(ib);
        #1;
        total = 0;
        for (int j = 0; j < 8; j++) begin
          int row_exp;
          row_exp = ((ib >> j) & 1) ? ia : 0;
          checks++;
          if (int'(pp[j]) != row_exp) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d b=%0d row %0d = %0d", ia, ib, j, pp[j]);
          end
          total += int'(pp[j]) << j;
        end
        checks++;
        if (total != ia * ib) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
