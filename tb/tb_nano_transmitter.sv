// tb_nano_transmitter: for every message and data value, the transmitted
// parity word must carry the message unchanged and an odd number of ones,
// the generator's garbage lines must return X1 and X2, and the code word
// must match the Hamming(7,4) code worked out here.
module tb_nano_transmitter;
  import nano_comm_pkg::*;
  logic [2:0]   msg;
  ham_data_t    ham_data;
  parity_word_t par_word;
  ham_code_t    ham_code;
  logic [1:0]   tx_gar;
  int checks = 0, failures = 0;

  nano_transmitter dut (.msg(msg), .ham_data(ham_data), .par_word(par_word), .ham_code(ham_code), .tx_gar(tx_gar));

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
    for (int m = 0; m < 8; m++)
      for (int d = 0; d < 16; d++) begin
        msg = 3'(m); ham_data = 4'(d);
        #1;
        checks++;
        if (par_word.msg !== msg) begin
          failures++; $display("FAIL msg %b sent as %b", msg, par_word.msg);
        end
        checks++;
        if ($countones(par_word) % 2 != 1) begin
          failures++; $display("FAIL word %b not odd", par_word);
        end
        checks++;
        if (tx_gar !== {msg[1], msg[0]}) begin
          failures++; $display("FAIL msg %b garbage %b", msg, tx_gar);
        end
        checks++;
        if (ham_code !== ref_encode(ham_data)) begin
          failures++; $display("FAIL data %h code %b", ham_data, ham_code);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
