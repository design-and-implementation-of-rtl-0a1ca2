// Self-checking testbench for peres_gate: all 8 input combinations, each
// output compared with the gate's defining equations evaluated here with
// integer arithmetic (b xor a as (a+b)%2, a and b as a*b).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ia, ib, ic;
      ia = (v >> 2) & 1; ib = (v >> 1) & 1; ic = v & 1;
      {a, b, c} = v[2:0];
      #1;
      checks++;
      if (p !== ia[0] || q !== 1'((ia + ib) % 2) || r !== 1'((ia * ib + ic) % 2)) begin
        failures++;
        $display("FAIL abc=%b%b%b got pqr=%b%b%b", a, b, c, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
