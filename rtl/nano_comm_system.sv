// nano_comm_system: nano communication network with error detection and
// single-error correction, built from reversible QCA gates.
//
// Transmitter -> transmission medium -> receiver. The 3-bit message X1..X3
// is sent with an odd parity bit made by a reversible parity generator
// (two Feynman gates); at the far end a reversible parity checker raises
// check_bit when the received word has even parity. In parallel, four data
// bits A0..A3 are sent as a Hamming(7,4) code word; the receiver computes
// the syndrome and a look-up table flips back a single corrupted bit.
// The channel noise is injected through par_err and ham_err (1 = flip that
// line). All paths are combinational: the QCA clock zones that pipeline
// the cell layout are not modelled, since their latency is not specified.
// The parity path follows the source design's equations; the Hamming code,
// its bit order and the error masks are this design's choices.
// Garbage outputs of the reversible gates are kept: tx_gar carries the
// generator's two (copies of X1, X2), rx_msg the checker's three (the
// received X1..X3).
// Interface: see the port list. Bit 0 of msg is X1, bit 0 of ham_data is A0,
// par_err is laid out as {parity, X3, X2, X1}, ham_err as code positions
// 7..1.
module nano_comm_system
  import nano_comm_pkg::*;
(
  input  logic [MSG_BITS-1:0]   msg,
  input  logic [PWORD_BITS-1:0] par_err,
  input  ham_data_t             ham_data,
  input  ham_code_t             ham_err,
  output logic                  tx_parity,
  output logic [1:0]            tx_gar,     // generator garbage {GAR2, GAR1}
  output logic [MSG_BITS-1:0]   rx_msg,
  output logic                  check_bit,
  output ham_syn_t              ham_syndrome,
  output ham_data_t             ham_corrected,
  output logic                  ham_error
);
  parity_word_t tx_word, rx_word;
  ham_code_t    tx_code, rx_code;

  nano_transmitter u_tx (
    .msg(msg), .ham_data(ham_data), .par_word(tx_word), .ham_code(tx_code),
    .tx_gar(tx_gar)
  );

  comm_channel #(.WIDTH(PWORD_BITS)) u_ch_par (
    .tx(tx_word), .err_mask(par_err), .rx(rx_word)
  );
  comm_channel #(.WIDTH(HAM_CODE)) u_ch_ham (
    .tx(tx_code), .err_mask(ham_err), .rx(rx_code)
  );

  nano_receiver u_rx (
    .par_word(rx_word), .ham_code(rx_code),
    .rx_msg(rx_msg), .check_bit(check_bit),
    .syndrome(ham_syndrome), .data(ham_corrected), .corrected(ham_error)
  );

  assign tx_parity = tx_word.parity;
endmodule
