// Self-checking testbench for half_adder: all 4 input pairs, {carry, sum}
// compared with the integer sum in1 + in2.
module tb_half_adder;
  logic in1, in2, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.in1(in1), .in2(in2), .sum(sum), .carry(carry));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {in1, in2} = v[1:0];
      total = v[1] + v[0];
      #1;
      checks++;
      if ({carry, sum} !== total[1:0]) begin
        failures++;
        $display("FAIL in=%b%b got carry,sum=%b%b", in1, in2, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
