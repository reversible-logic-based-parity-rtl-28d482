// nano_transmitter: the transmitting side of the nano communication network.
//
// Takes the 3-bit message X1..X3 and appends the odd parity bit from the
// reversible parity generator, so the transmitted 4-bit pattern always
// holds an odd number of ones. Next to it the Hamming encoder turns the
// data bits A0..A3 into a 7-bit code word. The generator's garbage outputs
// (copies of X1 and X2) are not transmitted; they are brought out on
// tx_gar so that the reversible gate's full output vector stays visible.
// Interface: msg, ham_data in; par_word, ham_code, tx_gar out.
// Purely combinational.
module nano_transmitter
  import nano_comm_pkg::*;
(
  input  logic [MSG_BITS-1:0] msg,       // [0] = X1
  input  ham_data_t           ham_data,  // [0] = A0
  output parity_word_t        par_word,
  output ham_code_t           ham_code,
  output logic [1:0]          tx_gar     // {GAR2, GAR1} = {X2, X1}
);
  parity_generator u_pgen (
    .x1(msg[0]), .x2(msg[1]), .x3(msg[2]),
    .parity(par_word.parity), .gar1(tx_gar[0]), .gar2(tx_gar[1])
  );
  assign par_word.msg = msg;

  hamming_encoder u_henc (.data(ham_data), .code(ham_code));
endmodule
