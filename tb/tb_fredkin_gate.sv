// Self-checking testbench for fredkin_gate: all 8 input combinations. The
// gate must pass the control through, keep the data lines when it is 0 and
// swap them when it is 1; it must also conserve the number of ones.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] exp_pqr;
      {a, b, c} = v[2:0];
      exp_pqr = (v[2] == 1'b0) ? v[2:0] : {v[2], v[0], v[1]};
      #1;
      checks++;
      if ({p, q, r} !== exp_pqr) begin
        failures++;
        $display("FAIL abc=%b got pqr=%b expected %b", v[2:0], {p, q, r}, exp_pqr);
      end
      checks++;
      if (32'(p) + 32'(q) + 32'(r) != 32'(v[2]) + 32'(v[1]) + 32'(v[0])) begin
        failures++;
        $display("FAIL abc=%b does not conserve ones", v[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
