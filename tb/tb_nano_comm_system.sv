// tb_nano_comm_system: end-to-end test of the nano communication network at
// its default (and only) configuration.
//
// Part 1 replays the generator/checker truth table over an ideal channel:
// for each 3-bit message the expected parity bit is a constant of the table
// and the check bit must stay 0.
// Part 2 sweeps every message, every 4-bit parity-path error pattern, every
// data value and every Hamming-path error pattern with at most one flipped
// line. Expected results are worked out here: the check bit is 1 exactly
// when an odd number of lines were flipped, the received message equals the
// sent one XOR the error pattern, and the Hamming data come back intact with
// the syndrome naming the flipped position.
// Each mechanism (clean parity word, detected error, even-weight error that
// parity cannot see, clean code word, corrected code word) is counted and
// must occur at least once.
module tb_nano_comm_system;
  import nano_comm_pkg::*;
  logic [2:0] msg, rx_msg;
  logic [3:0] par_err;
  logic [1:0] tx_gar;
  ham_data_t  ham_data, ham_corrected;
  ham_code_t  ham_err;
  logic       tx_parity, check_bit, ham_error;
  ham_syn_t   ham_syndrome;
  int checks = 0, failures = 0;
  int n_clean = 0, n_detected = 0, n_undetectable = 0, n_ham_clean = 0, n_ham_fixed = 0;
  // Parity bit for {X1,X2,X3} = 000 ... 111.
  logic table1_parity [8] = '{1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b0};

  nano_comm_system dut (
    .msg(msg), .par_err(par_err), .ham_data(ham_data), .ham_err(ham_err),
    .tx_parity(tx_parity), .tx_gar(tx_gar), .rx_msg(rx_msg), .check_bit(check_bit),
    .ham_syndrome(ham_syndrome), .ham_corrected(ham_corrected), .ham_error(ham_error)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Part 1: truth table over an ideal channel.
    par_err = '0; ham_err = '0; ham_data = '0;
    for (int i = 0; i < 8; i++) begin
      msg = {i[0], i[1], i[2]};  // msg[0] = X1 is the table's leftmost column
      #1;
      checks++;
      if (tx_parity !== table1_parity[i] || check_bit !== 1'b0 || rx_msg !== msg) begin
        failures++;
        $display("FAIL table row %0d: parity=%b check=%b rx=%b", i, tx_parity, check_bit, rx_msg);
      end
    end

    // Part 2: exhaustive sweep with injected errors.
    for (int m = 0; m < 8; m++)
      for (int pe = 0; pe < 16; pe++)
        for (int d = 0; d < 16; d++)
          for (int pos = 0; pos <= 7; pos++) begin
            int flips;
            msg = 3'(m); par_err = 4'(pe); ham_data = 4'(d);
            ham_err = (pos == 0) ? 7'd0 : 7'(1 << (pos - 1));
            #1;
            flips = $countones(4'(pe));
            checks++;
            if (check_bit !== (flips % 2 == 1)) begin
              failures++;
              $display("FAIL msg=%b err=%b check=%b", msg, par_err, check_bit);
            end
            checks++;
            if (tx_gar !== msg[1:0]) begin
              failures++;
              $display("FAIL msg=%b tx_gar=%b", msg, tx_gar);
            end
            checks++;
            if (rx_msg !== (msg ^ par_err[2:0])) begin
              failures++;
              $display("FAIL msg=%b err=%b rx=%b", msg, par_err, rx_msg);
            end
            checks++;
            if (ham_corrected !== ham_data || ham_syndrome !== 3'(pos) || ham_error !== (pos != 0)) begin
              failures++;
              $display("FAIL data=%h flip=%0d out=%h syn=%0d err=%b",
                       ham_data, pos, ham_corrected, ham_syndrome, ham_error);
            end
            if (flips == 0) n_clean++;
            else if (check_bit) n_detected++;
            else n_undetectable++;
            if (pos == 0) n_ham_clean++;
            else if (ham_error) n_ham_fixed++;
          end

    $display("mechanisms: parity_clean=%0d parity_detected=%0d parity_even_flips=%0d ham_clean=%0d ham_corrected=%0d",
             n_clean, n_detected, n_undetectable, n_ham_clean, n_ham_fixed);
    if (n_clean == 0)        begin failures++; $display("FAIL no clean parity word"); end
    if (n_detected == 0)     begin failures++; $display("FAIL no detected parity error"); end
    if (n_undetectable == 0) begin failures++; $display("FAIL no even-weight error"); end
    if (n_ham_clean == 0)    begin failures++; $display("FAIL no clean code word"); end
    if (n_ham_fixed == 0)    begin failures++; $display("FAIL no corrected code word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
