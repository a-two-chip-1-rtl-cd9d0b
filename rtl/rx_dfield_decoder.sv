`timescale 1ps/1fs
// rx_dfield_decoder: D-field decoder of the receiver.
//
// Returns the D-field of a received frame to true form (complementing it
// when the C-field decoder says the frame was inverted) and, for control
// frames, removes the two marker bits so that the control payload appears
// packed from bit 0 (14 bits in 16-bit mode, 18 in 20-bit mode).  Bits above
// the D-field width are zero.  Combinational.
// The control marker bits are this design's choice (see cimt_pkg).
module rx_dfield_decoder
  import cimt_pkg::*;
(
  input  frame_t  frame,
  input  logic    mode20,
  input  logic    inv,
  input  ftype_t  ftype,
  output dfield_t dout
);
  dfield_t d;

  always_comb begin
    d = '0;
    for (int i = 0; i < int'(MAXD); i++)
      if (i < int'(dbits(mode20))) d[i] = frame[i] ^ inv;
    dout = (ftype == FT_CTRL) ? ctrl_payload(d, mode20) : d;
  end
endmodule
