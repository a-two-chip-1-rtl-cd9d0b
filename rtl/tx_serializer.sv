`timescale 1ps/1fs
// tx_serializer: parallel-to-serial multiplexer of the transmitter.
//
// Runs on the bit clock.  The user's frame-rate strobe is brought into the
// bit-clock domain with two flops; each rising edge (each edge of either
// polarity when the strobe runs at half the frame rate) starts a frame:
// 'load' pulses for one cycle, the frame is taken into a shift register and
// sent LSB (D0) first, one bit per cycle, 20 or 24 bits.  If the next
// strobe edge is late, the line goes low until it comes.  'sout' is
// registered.  The synchronizer and edge rule are this design's choices.
module tx_serializer
  import cimt_pkg::*;
(
  input  logic   clk,         // bit clock
  input  logic   rst_n,
  input  logic   strb,        // user frame clock
  input  logic   half_rate,   // strobe at half the frame rate
  input  frame_t frame,       // frame to send
  output logic   load,        // frame taken this cycle
  output logic   sout         // serial output
);
  logic [2:0] s_sync;
  frame_t     sr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s_sync <= '0;
    else        s_sync <= {s_sync[1:0], strb};

  assign load = half_rate ? (s_sync[2] ^ s_sync[1]) : (s_sync[1] & ~s_sync[2]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sr   <= '0;
      sout <= 1'b0;
    end else if (load) begin
      sout <= frame[0];
      sr   <= frame >> 1;
    end else begin
      sout <= sr[0];
      sr   <= sr >> 1;
    end
endmodule
