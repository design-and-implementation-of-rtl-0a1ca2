// Self-checking testbench for approx_compressor: all 16 input patterns.
// 2*carry + sum is compared with the number of ones at the inputs, corrected
// by the compressor's intended error: +1 for a1a2a3a4 = 0100 and 1000, -1 for
// 0011 and 1111, exact otherwise. It also counts that exactly four patterns
// are approximated, two upward and two downward.
module tb_approx_compressor;
  logic a1, a2, a3, a4, sum, carry;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0;

  approx_compressor dut (.a1(a1), .a2(a2), .a3(a3), .a4(a4),
                         .sum(sum), .carry(carry));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones, err, expected, got;
      {a1, a2, a3, a4} = v[3:0];
      ones = v[3] + v[2] + v[1] + v[0];
      case (v)
        4'b0100, 4'b1000: err = 1;
        4'b0011, 4'b1111: err = -1;
        default:          err = 0;
      endcase
      expected = ones + err;
      #1;
      got = 2 * carry + sum;
      checks++;
      if (got != expected) begin
        failures++;
        $display("FAIL a=%b got %0d expected %0d", v[3:0], got, expected);
      end
      if (got > ones) n_up++;
      if (got < ones) n_down++;
    end
    checks++;
    if (n_up != 2 || n_down != 2) begin
      failures++;
      $display("FAIL error patterns: %0d up, %0d down", n_up, n_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
