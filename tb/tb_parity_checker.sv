// tb_parity_checker: all 16 received words. check_bit must be 1 exactly
// when the word has an even number of ones (counted here bit by bit), and
// GAR1..GAR3 must return X1..X3.
module tb_parity_checker;
  logic x1, x2, x3, par, check_bit, gar1, gar2, gar3;
  int checks = 0, failures = 0;

  parity_checker dut (.x1(x1), .x2(x2), .x3(x3), .parity(par),
                      .check_bit(check_bit), .gar1(gar1), .gar2(gar2), .gar3(gar3));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int ones;
      {x1, x2, x3, par} = 4'(i);
      ones = int'(x1) + int'(x2) + int'(x3) + int'(par);
      #1;
      checks++;
      if (check_bit !== (ones % 2 == 0)) begin
        failures++;
        $display("FAIL word=%b%b%b%b check=%b", x1, x2, x3, par, check_bit);
      end
      checks++;
      if ({gar1, gar2, gar3} !== {x1, x2, x3}) begin
        failures++;
        $display("FAIL garbage %b%b%b", gar1, gar2, gar3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
