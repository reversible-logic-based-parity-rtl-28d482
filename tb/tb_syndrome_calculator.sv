// tb_syndrome_calculator: the 16 Hamming(7,4) code words (parity bits
// p1 = A0^A1^A3, p2 = A0^A2^A3, p4 = A1^A2^A3 worked out here) must give
// syndrome 0, and each single flipped position must give its own index.
module tb_syndrome_calculator;
  import nano_comm_pkg::*;
  ham_code_t code;
  ham_syn_t  syndrome;
  int checks = 0, failures = 0;

  syndrome_calculator dut (.code(code), .syndrome(syndrome));

  function automatic ham_code_t ref_encode(input logic [3:0] a);
    // positions 7..1: A3 A2 A1 p4 A0 p2 p1
    return {a[3], a[2], a[1], a[1]^a[2]^a[3], a[0], a[0]^a[2]^a[3], a[0]^a[1]^a[3]};
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      for (int pos = 0; pos <= 7; pos++) begin
        code = ref_encode(4'(d));
        if (pos > 0) code[pos-1] = ~code[pos-1];
        #1;
        checks++;
        if (syndrome !== 3'(pos)) begin
          failures++;
          $display("FAIL data=%h flip=%0d syndrome=%0d", d, pos, syndrome);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
