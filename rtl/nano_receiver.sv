// nano_receiver: the receiving side of the nano communication network.
//
// The reversible parity checker examines the received 4-bit word and
// raises check_bit when it holds an even number of ones (an odd number of
// bits were flipped in the channel); its garbage outputs return the
// received message X1..X3. The syndrome calculator and the look-up table
// locate and flip back a single corrupted bit of the received Hamming code
// word and return the data bits A0..A3.
// Interface: par_word, ham_code in; rx_msg, check_bit, syndrome, data,
// corrected out. Purely combinational.
module nano_receiver
  import nano_comm_pkg::*;
(
  input  parity_word_t        par_word,
  input  ham_code_t           ham_code,
  output logic [MSG_BITS-1:0] rx_msg,     // GAR1..GAR3 = X1..X3
  output logic                check_bit,  // 1 = error detected
  output ham_syn_t            syndrome,
  output ham_data_t           data,
  output logic                corrected
);
  parity_checker u_pchk (
    .x1(par_word.msg[0]), .x2(par_word.msg[1]), .x3(par_word.msg[2]),
    .parity(par_word.parity), .check_bit(check_bit),
    .gar1(rx_msg[0]), .gar2(rx_msg[1]), .gar3(rx_msg[2])
  );

  syndrome_calculator u_syn (.code(ham_code), .syndrome(syndrome));
  lookup_table        u_lut (.code(ham_code), .syndrome(syndrome),
                             .data(data), .corrected(corrected));
endmodule
