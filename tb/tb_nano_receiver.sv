// tb_nano_receiver: all 16 received parity words (check_bit must be 1 for
// even parity, and the message must come back on the garbage lines), and
// every Hamming(7,4) code word with no error or one flipped bit (data must
// be restored and the syndrome must name the flipped position).
module tb_nano_receiver;
  import nano_comm_pkg::*;
  parity_word_t par_word;
  ham_code_t    ham_code;
  logic [2:0]   rx_msg;
  logic         check_bit, corrected;
  ham_syn_t     syndrome;
  ham_data_t    data;
  int checks = 0, failures = 0;

  nano_receiver dut (.par_word(par_word), .ham_code(ham_code), .rx_msg(rx_msg),
                     .check_bit(check_bit), .syndrome(syndrome), .data(data),
                     .corrected(corrected));

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
    ham_code = '0;
    for (int w = 0; w < 16; w++) begin
      par_word = 4'(w);
      #1;
      checks++;
      if (check_bit !== ($countones(4'(w)) % 2 == 0)) begin
        failures++; $display("FAIL word %b check=%b", par_word, check_bit);
      end
      checks++;
      if (rx_msg !== par_word.msg) begin
        failures++; $display("FAIL word %b rx_msg=%b", par_word, rx_msg);
      end
    end
    par_word = '0;
    for (int d = 0; d < 16; d++)
      for (int pos = 0; pos <= 7; pos++) begin
        ham_code = ref_encode(4'(d));
        if (pos > 0) ham_code[pos-1] = ~ham_code[pos-1];
        #1;
        checks++;
        if (syndrome !== 3'(pos) || data !== 4'(d) || corrected !== (pos != 0)) begin
          failures++;
          $display("FAIL data=%h flip=%0d syn=%0d out=%h corr=%b", d, pos, syndrome, data, corrected);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
