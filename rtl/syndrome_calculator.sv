// syndrome_calculator: syndrome of a received Hamming(7,4) code word.
//
// Recomputes the three parity checks over the received word (positions
// 1..7 = code[0]..code[6]). Syndrome bit k is the parity of every position
// whose index has bit k set, so after a single bit error the syndrome equals
// the position of the flipped bit; 0 means the word is a valid code word.
// The code layout matches hamming_encoder. The source design only names
// this block; the standard Hamming syndrome is this design's reading.
// Interface: code in; syndrome out. Purely combinational.
module syndrome_calculator
  import nano_comm_pkg::*;
(
  input  ham_code_t code,
  output ham_syn_t  syndrome
);
  always_comb begin
    syndrome = '0;
    for (int unsigned pos = 1; pos <= HAM_CODE; pos++) begin
      for (int unsigned k = 0; k < HAM_SYN; k++) begin
        if (pos[k]) syndrome[k] ^= code[pos-1];
      end
    end
  end
endmodule
