// Self-checking test of `mux_adder8`: all 65,536 operand pairs against an
// integer sum. It also counts how often the low nibble's carry incremented
// the high nibble (including the case where the increment itself carries
// out) and how often the high nibble's own carry produced cout, and fails
// if any of these never happened.
module tb_mux_adder8;

  logic [7:0] a8, b8, s8;
  logic       cout;
  int checks = 0, failures = 0;
  int n_inc = 0, n_inc_carry = 0, n_hi_carry = 0;

  mux_adder8 dut (.a8(a8), .b8(b8), .s8(s8), .cout(cout));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int lo, hi;
        a8 = i[7:0]; b8 = j[7:0];
        #1;
        checks++;
        if ({cout, s8} !== 9'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL %h + %h = %h, exp %h", a8, b8, {cout, s8}, i + j);
        end
        lo = (i % 16) + (j % 16);
        hi = (i / 16) + (j / 16);
        if (lo > 15) n_inc++;
        if (lo > 15 && hi % 16 == 15) n_inc_carry++;
        if (hi > 15) n_hi_carry++;
      end
    checks++;
    if (n_inc == 0 || n_inc_carry == 0 || n_hi_carry == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("increment=%0d increment-carry=%0d high-carry=%0d", n_inc, n_inc_carry, n_hi_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
