// tb_parity_generator: checks the odd-parity generator against its full
// truth table (X1 X2 X3 -> parity, GAR1, GAR2), typed in as constants, and
// that every generated 4-bit word holds an odd number of ones.
module tb_parity_generator;
  logic x1, x2, x3, parity, gar1, gar2;
  int checks = 0, failures = 0;
  // Row i is {X1,X2,X3} = i; entry {parity, GAR1, GAR2}.
  logic [2:0] table_row [8] = '{
    3'b1_00, 3'b0_00, 3'b0_01, 3'b1_01,
    3'b0_10, 3'b1_10, 3'b1_11, 3'b0_11
  };

  parity_generator dut (.x1(x1), .x2(x2), .x3(x3),
                        .parity(parity), .gar1(gar1), .gar2(gar2));

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
      {x1, x2, x3} = 3'(i);
      #1;
      checks++;
      if ({parity, gar1, gar2} !== table_row[i]) begin
        failures++;
        $display("FAIL X=%b%b%b parity=%b gar1=%b gar2=%b", x1, x2, x3, parity, gar1, gar2);
      end
      ones = int'(x1) + int'(x2) + int'(x3) + int'(parity);
      checks++;
      if (ones % 2 != 1) begin
        failures++;
        $display("FAIL word %b%b%b%b not odd", x1, x2, x3, parity);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
