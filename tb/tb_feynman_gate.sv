// Self-checking testbench for feynman_gate: all 4 input combinations,
// expected outputs (a, (a+b) mod 2) computed with integer arithmetic.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if (p !== v[1] || q !== 1'((v[1] + v[0]) % 2)) begin
        failures++;
        $display("FAIL ab=%b%b got pq=%b%b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
