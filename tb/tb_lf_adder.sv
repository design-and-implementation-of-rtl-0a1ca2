// Self-checking testbench for lf_adder. Three instances: the 8-bit default
// (all 65,536 operand pairs), the 16-bit width the multiplier uses and a
// 5-bit width that is not a power of two (random pairs). {cout, sum} is
// compared with the integer sum a + b. It also counts operand pairs whose
// carry ripples through every bit (a + b = 2**WIDTH - 1 plus one carry).
module tb_lf_adder;
  logic [7:0]  a8, b8, s8;
  logic        c8;
  logic [15:0] a16, b16, s16;
  logic        c16;
  logic [4:0]  a5, b5, s5;
  logic        c5;
  int checks = 0, failures = 0;
  int long_carries = 0;

  lf_adder dut8 (.a(a8), .b(b8), .sum(s8), .cout(c8));
  lf_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .sum(s16), .cout(c16));
  lf_adder #(.WIDTH(5))  dut5  (.a(a5), .b(b5), .sum(s5), .cout(c5));

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
        a8 = 8'(ia); b8 = 8'(ib);
        #1;
        checks++;
        if (int'({c8, s8}) != ia + ib) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d+%0d got %0d", ia, ib, {c8, s8});
        end
        if ((ia ^ ib) == 8'hfe && (ia & ib & 1) == 1) long_carries++;
      end
    end
    for (int n = 0; n < 20000; n++) begin
      int ia, ib;
      ia = int'($urandom_range(65535));
      ib = (n % 4 == 0) ? (65535 - ia) + int'($urandom_range(1)) : int'($urandom_range(65535));
      a16 = 16'(ia); b16 = 16'(ib);
      a5 = 5'(ia); b5 = 5'(ib);
      #1;
      checks++;
      if (int'({c16, s16}) != ia + ib) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit %0d+%0d got %0d", ia, ib, {c16, s16});
      end
      checks++;
      if (int'({c5, s5}) != (ia % 32) + (ib % 32)) begin
        failures++;
        if (failures < 10) $display("FAIL 5-bit %0d+%0d got %0d", ia % 32, ib % 32, {c5, s5});
      end
    end
    checks++;
    if (long_carries == 0) begin
      failures++;
      $display("FAIL no full-length carry was exercised");
    end
    $display("full-length carries exercised: %0d", long_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
