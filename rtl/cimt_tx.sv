`timescale 1ps/1fs
// cimt_tx: the transmitter chip's logic, running on the serial bit clock.
//
// The user presents a 16- or 20-bit word D, DAV (data available), CAV
// (control available) and FLAG at each edge of the frame-rate strobe.  The
// serializer detects the strobe edge in the bit-clock domain and takes the
// frame encoded from the previous word, while the encoder captures the new
// one (inputs are sampled three bit clocks after the strobe edge).  The
// encoder applies the conditional-invert rule with its majority gate and
// running-disparity counter and adds the C-field; the serializer sends the
// frame D0 first.  RFD (ready for data) and the choice of fill frame come
// from the start-up state machine of the co-located receiver.
// Latency: a word presented at strobe edge k starts on the line about three
// bit clocks after strobe edge k+1.
// The partition (clock generator, encoder with majority gate and disparity
// counter, serializer) follows the published transmitter; the one-frame
// pipeline and the strobe synchronizer are this design's choices.
module cimt_tx
  import cimt_pkg::*;
(
  input  logic    sclk,        // bit clock from the clock generator
  input  logic    rst_n,
  input  logic    strb,        // user frame clock (full or half rate)
  input  logic    half_rate,
  input  logic    mode20,      // 1: 20-bit words, 24-bit frames
  input  dfield_t d,
  input  logic    dav,
  input  logic    cav,
  input  logic    flag,
  input  logic    flagsel,     // 1: FLAG is user data, 0: toggled
  input  logic    rfd,         // from the SMC
  input  logic    send_ff0,    // from the SMC
  output logic    dout,        // serial line output
  output ftype_t  ftype_sent,  // type of the frame being issued (at load)
  output logic    inv_sent,    // it is sent inverted
  output logic    load,        // one pulse per frame
  output logic signed [7:0] run_disp  // running disparity before this frame
);
  frame_t frame;

  tx_frame_encoder u_enc (
    .clk(sclk), .rst_n(rst_n), .adv(load), .mode20(mode20), .d(d),
    .dav(dav), .cav(cav), .flag(flag), .flagsel(flagsel), .rfd(rfd),
    .send_ff0(send_ff0), .frame(frame), .ftype(ftype_sent),
    .inverted(inv_sent), .rd(run_disp));

  tx_serializer u_ser (
    .clk(sclk), .rst_n(rst_n), .strb(strb), .half_rate(half_rate),
    .frame(frame), .load(load), .sout(dout));
endmodule
