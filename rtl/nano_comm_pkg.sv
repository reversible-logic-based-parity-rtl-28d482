// nano_comm_pkg: sizes shared by the nano communication network.
//
// The odd-parity path carries a 3-bit message (X1..X3) plus one parity bit.
// The single-error-correcting path carries 4 data bits (A0..A3) as a 7-bit
// Hamming code word with a 3-bit syndrome. The 3 + 1 bit split and the
// four data inputs A0..A3 come from the source design; the 7-bit code word
// and 3-bit syndrome are the standard Hamming(7,4) choice made here.
package nano_comm_pkg;

  localparam int unsigned MSG_BITS  = 3;             // X1..X3
  localparam int unsigned PWORD_BITS = MSG_BITS + 1; // X1..X3 + parity
  localparam int unsigned HAM_DATA  = 4;             // A0..A3
  localparam int unsigned HAM_CODE  = 7;             // Hamming(7,4) word
  localparam int unsigned HAM_SYN   = 3;             // syndrome width

  // Parity-protected word as it crosses the channel.
  typedef struct packed {
    logic                parity;
    logic [MSG_BITS-1:0] msg;   // msg[0] = X1, msg[1] = X2, msg[2] = X3
  } parity_word_t;

  typedef logic [HAM_DATA-1:0] ham_data_t;  // [0] = A0 ... [3] = A3
  typedef logic [HAM_CODE-1:0] ham_code_t;  // [i] = code position i+1
  typedef logic [HAM_SYN-1:0]  ham_syn_t;

endpackage
