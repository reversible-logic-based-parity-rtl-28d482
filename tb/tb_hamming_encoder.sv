// tb_hamming_encoder: for all 16 data values, checks that the data bits
// sit at code positions 3, 5, 6, 7, that the three parity checks of the
// Hamming code (positions whose index has bit k set) are all even, and
// that any two code words differ in at least three positions.
module tb_hamming_encoder;
  import nano_comm_pkg::*;
  ham_data_t data;
  ham_code_t code;
  ham_code_t words [16];
  int checks = 0, failures = 0;

  hamming_encoder dut (.data(data), .code(code));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      data = 4'(d);
      #1;
      words[d] = code;
      checks++;
      if ({code[6], code[5], code[4], code[2]} !== data) begin
        failures++;
        $display("FAIL data %h not at positions 3,5,6,7: code=%b", data, code);
      end
      for (int k = 0; k < 3; k++) begin
        logic s;
        s = 1'b0;
        for (int pos = 1; pos <= 7; pos++)
          if ((pos >> k) & 1) s ^= code[pos-1];
        checks++;
        if (s !== 1'b0) begin
          failures++;
          $display("FAIL data %h check %0d odd: code=%b", data, k, code);
        end
      end
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
        checks++;
        if ($countones(words[i] ^ words[j]) < 3) begin
          failures++;
          $display("FAIL distance %0d-%0d below 3", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
