`timescale 1ps/1fs
// tx_majority: frame polarity of the transmitter's majority gate.
//
// The chip computes the polarity of each outgoing frame with a DAC-like
// current-summing circuit and a comparator.  This module does the same job
// digitally: it counts the ones of the frame as it would be sent in true
// form (D-field and C-field, 20 or 24 bits) and reports whether ones
// outnumber zeros, together with the signed disparity (ones - zeros).
// Including the C-field in the count and calling a balanced frame "not
// heavy" are this design's choices.  Purely combinational.
module tx_majority #(
  parameter int unsigned N = 24          // widest frame
) (
  input  logic [N-1:0]       frame,      // bit 0 first on the line
  input  logic               len24,      // 1: 24-bit frame, 0: 20-bit frame
  output logic               heavy,      // more ones than zeros
  output logic signed [7:0]  disparity   // ones - zeros
);
  logic [7:0] ones;
  logic [7:0] nbits;

  always_comb begin
    ones  = '0;
    nbits = len24 ? 8'(N) : 8'(N - 4);
    for (int i = 0; i < int'(N); i++)
      if (len24 || i < int'(N) - 4) ones = ones + 8'(frame[i]);
    disparity = signed'(8'(2 * ones) - nbits);
    heavy     = disparity > 0;
  end
endmodule
