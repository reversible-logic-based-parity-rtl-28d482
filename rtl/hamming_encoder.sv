// hamming_encoder: Hamming(7,4) encoder for the data bits A0..A3.
//
// The source design names a Hamming encoder fed by A3..A0 but does not give
// its code; the standard single-error-correcting Hamming(7,4) code is used.
// Code positions 1..7 are code[0]..code[6]; positions 1, 2 and 4 hold the
// check bits and positions 3, 5, 6, 7 hold A0, A1, A2, A3. Check bit at
// position 2^k is the even parity of all data positions whose index has
// bit k set:
//   p1 = A0 ^ A1 ^ A3,  p2 = A0 ^ A2 ^ A3,  p4 = A1 ^ A2 ^ A3.
// Interface: data in; code out. Purely combinational.
module hamming_encoder
  import nano_comm_pkg::*;
(
  input  ham_data_t data,
  output ham_code_t code
);
  always_comb begin
    code[2] = data[0];                        // position 3
    code[4] = data[1];                        // position 5
    code[5] = data[2];                        // position 6
    code[6] = data[3];                        // position 7
    code[0] = data[0] ^ data[1] ^ data[3];    // p1 covers 3, 5, 7
    code[1] = data[0] ^ data[2] ^ data[3];    // p2 covers 3, 6, 7
    code[3] = data[1] ^ data[2] ^ data[3];    // p4 covers 5, 6, 7
  end
endmodule
