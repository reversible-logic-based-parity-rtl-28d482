// tb_qca_majority: exhaustive check of the three-input majority gate
// against a count of ones (majority = at least two inputs at 1).
module tb_qca_majority;
  logic a, b, c, m;
  int checks = 0, failures = 0;

  qca_majority dut (.a(a), .b(b), .c(c), .m(m));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ones;
      {a, b, c} = 3'(i);
      ones = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if (m !== (ones >= 2)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b m=%b", a, b, c, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
