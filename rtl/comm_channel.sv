// comm_channel: the transmission medium between transmitter and receiver.
//
// In the QCA layout the medium is a bundle of cell wires that copy each
// transmitted bit to the receiver. To let the error-detecting and
// error-correcting parts be exercised, this model adds the noise as an
// explicit error mask: every bit whose mask bit is 1 arrives inverted.
// With err_mask = 0 the channel is an ideal wire. The mask is this design's
// addition; the source design only says that noise may turn 0s into 1s and
// 1s into 0s.
// Parameter WIDTH: number of lines (4 = three message bits plus parity).
// Interface: tx, err_mask in; rx out. Purely combinational.
module comm_channel #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] tx,
  input  logic [WIDTH-1:0] err_mask,
  output logic [WIDTH-1:0] rx
);
  assign rx = tx ^ err_mask;
endmodule
