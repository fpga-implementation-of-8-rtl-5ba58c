// Self-checking test of `and_row`: every multiplier byte against both values
// of the multiplicand bit. The expected row is worked out bit by bit.
module tb_and_row;

  logic [7:0] mlr, tp;
  logic       mndcheck;
  int checks = 0, failures = 0;

  and_row dut (.mlr(mlr), .mndcheck(mndcheck), .tp(tp));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 256; m++) begin
      for (int c = 0; c < 2; c++) begin
        logic [7:0] exp;
        mlr = m[7:0]; mndcheck = c[0];
        #1;
        for (int i = 0; i < 8; i++) exp[i] = (mlr[i] == 1'b1 && mndcheck == 1'b1);
        checks++;
        if (tp !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL mlr=%h mndcheck=%b tp=%h exp=%h", mlr, mndcheck, tp, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
