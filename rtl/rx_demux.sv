`timescale 1ps/1fs
// rx_demux: frame clock and demultiplexer of the receiver.
//
// A counter divides the recovered bit clock by the frame length (20 or 24)
// to give the frame clock; its count 'pos' is the frame position of the bit
// now leaving the retiming latch.  Each retimed bit is written to its place
// of a frame buffer; when the last bit arrives, the whole frame is presented
// on 'frame' with a one-cycle 'fvalid' pulse.  Frame alignment is not
// searched for here: the PLL moves the bit clock until the master transition
// falls at its position, which aligns the counter to the frames.
// Using the PLL rather than a separate frame search is the published
// scheme; the buffer-and-present structure is this design's.
module rx_demux
  import cimt_pkg::*;
(
  input  logic       clk,       // recovered bit clock
  input  logic       rst_n,
  input  logic       mode20,    // 24-bit frames
  input  logic       rdata,     // retimed data
  output logic [4:0] pos,       // frame position of rdata
  output frame_t     frame,     // last complete frame, bit 0 first
  output logic       fvalid     // frame just completed
);
  frame_t buf_q, nxt;
  logic [4:0] last;

  assign last = mode20 ? 5'd23 : 5'd19;

  always_comb begin
    nxt      = buf_q;
    nxt[pos] = rdata;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pos    <= '0;
      buf_q  <= '0;
      frame  <= '0;
      fvalid <= 1'b0;
    end else begin
      buf_q  <= nxt;
      fvalid <= (pos >= last);
      if (pos >= last) begin
        frame <= nxt & frame_mask(mode20);
        pos   <= '0;
      end else begin
        pos   <= pos + 5'd1;
      end
    end
endmodule
