// Self-checking testbench for dsc_cell: all 16 input patterns. The expected
// complemented outputs come from the cell's arithmetic intent: the true
// carry stands for "a1 or a2 set", and the true sum is a3 AND a4 when exactly
// one of a1, a2 is set, a3 OR a4 otherwise; both are returned inverted.
module tb_dsc_cell;
  logic a1, a2, a3, a4, carry_n, sum_n;
  int checks = 0, failures = 0;

  dsc_cell dut (.a1(a1), .a2(a2), .a3(a3), .a4(a4),
                .carry_n(carry_n), .sum_n(sum_n));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int n12, n34;
      logic exp_c, exp_s;
      {a1, a2, a3, a4} = v[3:0];
      n12 = v[3] + v[2];
      n34 = v[1] + v[0];
      exp_c = (n12 > 0);
      exp_s = (n12 == 1) ? (n34 == 2) : (n34 > 0);
      #1;
      checks++;
      if (carry_n !== ~exp_c || sum_n !== ~exp_s) begin
        failures++;
        $display("FAIL a=%b got carry_n,sum_n=%b%b", v[3:0], carry_n, sum_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
