`timescale 1ps/1fs
// rx_input_select: receiver input selector.
//
// Chooses what feeds the two sampling latches: the normal line input, the
// loopback input (the co-located transmitter's output, for self test) or the
// output of the on-chip cable equalizer, which is analog and enters here as
// a plain signal.  Select code 0 = line, 1 = loopback, 2 or 3 = equalized
// (the encoding is this design's choice).  Combinational.
module rx_input_select (
  input  logic [1:0] sel,
  input  logic       din,       // normal line input
  input  logic       lin,       // loopback input
  input  logic       ein,       // equalized input
  output logic       dsel
);
  always_comb
    unique case (sel)
      2'd0:    dsel = din;
      2'd1:    dsel = lin;
      default: dsel = ein;
    endcase
endmodule
