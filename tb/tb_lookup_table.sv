// tb_lookup_table: feeds each Hamming(7,4) code word with no error or one
// flipped position, together with the syndrome that names that position,
// and expects the original data bits back and 'corrected' set only when a
// bit was flipped.
module tb_lookup_table;
  import nano_comm_pkg::*;
  ham_code_t code;
  ham_syn_t  syndrome;
  ham_data_t data;
  logic      corrected;
  int checks = 0, failures = 0;

  lookup_table dut (.code(code), .syndrome(syndrome), .data(data), .corrected(corrected));

  function automatic ham_code_t ref_encode(input logic [3:0] a);
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
        syndrome = 3'(pos);
        #1;
        checks++;
        if (data !== 4'(d)) begin
          failures++;
          $display("FAIL data=%h flip=%0d got %h", d, pos, data);
        end
        checks++;
        if (corrected !== (pos != 0)) begin
          failures++;
          $display("FAIL data=%h flip=%0d corrected=%b", d, pos, corrected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
