// lookup_table: single-error correction for the Hamming(7,4) receiver.
//
// A table with one entry per syndrome value holds the correction mask for
// that value: all zeros for syndrome 0, otherwise a single 1 at the code
// position the syndrome names (entry s = 1 << (s-1)). The received word is
// XORed with the selected mask and the data bits A0..A3 are taken from
// positions 3, 5, 6, 7. 'corrected' is 1 when a nonzero mask was applied.
// The source design names a look-up table after the syndrome calculator;
// its contents are this design's reading of a standard Hamming corrector.
// Interface: code, syndrome in; data, corrected out. Purely combinational.
module lookup_table
  import nano_comm_pkg::*;
(
  input  ham_code_t code,
  input  ham_syn_t  syndrome,
  output ham_data_t data,
  output logic      corrected
);
  ham_code_t mask, fixed;

  always_comb begin
    unique case (syndrome)
      3'd0: mask = 7'b000_0000;
      3'd1: mask = 7'b000_0001;
      3'd2: mask = 7'b000_0010;
      3'd3: mask = 7'b000_0100;
      3'd4: mask = 7'b000_1000;
      3'd5: mask = 7'b001_0000;
      3'd6: mask = 7'b010_0000;
      3'd7: mask = 7'b100_0000;
      default: mask = 7'b000_0000;
    endcase
    fixed     = code ^ mask;
    data      = {fixed[6], fixed[5], fixed[4], fixed[2]};
    corrected = |mask;
  end
endmodule
