// Self-checking test of `mux_adder4`: the rows of the 4-bit adder truth table
// printed with the reference design, then all 256 operand pairs against an
// integer sum.
module tb_mux_adder4;

  logic [3:0] a, b, s;
  logic       cout;
  int checks = 0, failures = 0;

  mux_adder4 dut (.a({b, a}), .s(s), .cout(cout));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] ta, input logic [3:0] tb_, input logic [4:0] exp);
    a = ta; b = tb_;
    #1;
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got=%b exp=%b", ta, tb_, {cout, s}, exp);
    end
  endtask

  initial begin
    // Published truth-table rows: {a, b} -> {carry, sum}
    check(4'b0000, 4'b0000, 5'b00000);
    check(4'b0000, 4'b0001, 5'b00001);
    check(4'b0000, 4'b0010, 5'b00010);
    check(4'b0000, 4'b0011, 5'b00011);
    check(4'b0000, 4'b0100, 5'b00100);
    check(4'b0000, 4'b0101, 5'b00101);
    check(4'b0000, 4'b0110, 5'b00110);
    check(4'b0000, 4'b0111, 5'b00111);
    check(4'b1111, 4'b1111, 5'b11110);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(i[3:0], j[3:0], 5'(i + j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
