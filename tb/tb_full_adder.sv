// Self-checking testbench for full_adder: all 8 input combinations,
// {carry, sum} compared with the integer sum in1 + in2 + cin.
module tb_full_adder;
  logic in1, in2, cin, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.in1(in1), .in2(in2), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {in1, in2, cin} = v[2:0];
      total = v[2] + v[1] + v[0];
      #1;
      checks++;
      if ({carry, sum} !== total[1:0]) begin
        failures++;
        $display("FAIL in=%b got carry,sum=%b%b", v[2:0], carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
