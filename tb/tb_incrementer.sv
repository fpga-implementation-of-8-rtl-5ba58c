// Self-checking test of `incrementer` at its default width of 4: every value
// of its, itc and itc1. Expected: is8 = its + itc (mod 16), icout = carry of
// that sum OR itc1. Also counts that the carry-ripple case (its = 1111,
// itc = 1) and the OR path (itc1 alone) were both exercised.
module tb_incrementer;

  logic [3:0] its, is8;
  logic       itc, itc1, icout;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_or = 0;

  incrementer dut (.its(its), .itc(itc), .itc1(itc1), .is8(is8), .icout(icout));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++)
      for (int c = 0; c < 2; c++)
        for (int o = 0; o < 2; o++) begin
          int sum;
          its = v[3:0]; itc = c[0]; itc1 = o[0];
          #1;
          sum = v + c;
          checks++;
          if (is8 !== 4'(sum) || icout !== ((sum > 15) || o == 1)) begin
            failures++;
            $display("FAIL its=%h itc=%b itc1=%b is8=%h icout=%b", its, itc, itc1, is8, icout);
          end
          if (sum > 15) n_wrap++;
          if (o == 1 && sum <= 15) n_or++;
        end
    checks++;
    if (n_wrap == 0 || n_or == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: wrap=%0d or=%0d", n_wrap, n_or);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
