// End-to-end, full-size test of `multiply` at its default sizes.
//
// First the three sample products shown in the reference simulation
// (0d x 15 = 00111, 8d x 55 = 02ed1, ff x ff = 0fe01, plus 00 x 01), with
// the partial-product rows checked as well. Then all 65,536 operand pairs
// against an integer product. The design is combinational, so each product
// is checked 1 ns after the operands change, in the same step.
//
// It also counts how often each carry-merging mechanism fired and fails if
// one never did: the carry out of each level-2 adder (x1, x2) merged into
// the bits above it, the OR path of those merges (the carry of a level-1
// sum), the carry of the final adder incrementing the top bits, and that
// increment rippling into the top incrementer's second bit.
module tb_multiply;

  logic [7:0]  mlr, mnd;
  logic [16:0] p;
  int checks = 0, failures = 0;
  int n_cx1 = 0, n_cx2 = 0, n_or1 = 0, n_or2 = 0, n_cf = 0, n_ripple = 0;

  multiply dut (.mlr(mlr), .mnd(mnd), .p(p));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input logic [7:0] a, input logic [7:0] b, input logic [16:0] exp);
    mlr = a; mnd = b;
    #1;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL sample %h x %h = %h, exp %h", a, b, p, exp);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (dut.pp[i] !== (b[i] ? a : 8'h00)) begin
        failures++;
        $display("FAIL sample %h x %h pp%0d=%h", a, b, i, dut.pp[i]);
      end
    end
  endtask

  initial begin
    sample(8'h00, 8'h01, 17'h00000);
    sample(8'h0d, 8'h15, 17'h00111);
    sample(8'h8d, 8'h55, 17'h02ed1);
    sample(8'hff, 8'hff, 17'h0fe01);

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        mlr = i[7:0]; mnd = j[7:0];
        #1;
        checks++;
        if (p !== 17'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %h x %h = %h, exp %h", mlr, mnd, p, i * j);
        end
        if (dut.cx1) n_cx1++;
        if (dut.cx2) n_cx2++;
        if (dut.r[1][8]) n_or1++;
        if (dut.r[3][8]) n_or2++;
        if (dut.cf) n_cf++;
        if (dut.cf && dut.x2[6]) n_ripple++;
      end

    $display("x1 carry=%0d x2 carry=%0d merge-or1=%0d merge-or2=%0d final carry=%0d ripple=%0d",
             n_cx1, n_cx2, n_or1, n_or2, n_cf, n_ripple);
    checks++;
    if (n_cx1 == 0 || n_cx2 == 0 || n_or1 == 0 || n_or2 == 0 || n_cf == 0 || n_ripple == 0) begin
      failures++;
      $display("FAIL a carry-merging mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
