`timescale 1ps/1fs
// tx_disparity_counter: running disparity of everything the transmitter sent.
//
// The chip keeps an up/down counter that counts up on each transmitted ONE
// and down on each ZERO; its sign is compared against the polarity of the
// next frame.  Here the counter adds the disparity of a whole frame in one
// step when the frame is issued (upd), which gives the same value at every
// frame boundary, where the sign is used.  Reset clears it to zero.
// With the conditional-invert rule the count stays within +-24, so 8 bits
// (signed) suffice.
module tx_disparity_counter #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                upd,         // one frame issued
  input  logic signed [W-1:0] frame_disp,  // its ones - zeros
  output logic signed [W-1:0] rd,          // running disparity
  output logic                positive     // rd > 0
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   rd <= '0;
    else if (upd) rd <= rd + frame_disp;

  assign positive = rd > 0;
endmodule
