`timescale 1ps/1fs
// glink_node: one end of a full-duplex serial link (transmitter chip plus
// receiver chip, with the receiver's start-up controller steering the
// transmitter).  Two nodes with their serial outputs crossed form the
// "virtual ribbon cable": parallel words in at one end, out at the other.
//
// Transmit side: the user's frame-rate strobe feeds the clock generator
// model, whose bit clock runs the CIMT encoder and serializer; 'dout' is the
// serial line.  Receive side: the loop filter / VCO model recovers the bit
// clock from the selected input under control of the phase and frequency
// detectors of the receiver logic, which demultiplexes and decodes the
// frames.  The receiver's start-up state machine chooses the transmitter's
// fill frame and its ready-for-data (tx_rfd) output.  The SMC signals
// cross from the recovered-clock domain to the bit-clock domain as slow
// levels and are sampled once per frame by the encoder.
// The cable equalizer is analog and outside: its output enters on 'ein'.
// The clock generator and the loop filter / VCO are behavioural models, so
// this top is for simulation; cimt_tx and cimt_rx are the synthesizable
// parts.
// The node structure and the SMC-to-transmitter wiring follow the
// published full-duplex link; the port grouping is this design's.
module glink_node
  import cimt_pkg::*;
#(
  parameter int unsigned LOCK_FRAMES = 32,
  parameter real         F_INIT_MHZ  = 1500.0
) (
  input  logic       rst_n,
  input  logic       mode20,      // 1: 20-bit words, 24-bit frames
  input  logic       flagsel,     // 1: FLAG carries data, 0: toggled and checked
  // transmit user side
  input  logic       strbin,      // frame-rate (or half-rate) clock
  input  logic       half_rate,
  input  dfield_t    tx_d,
  input  logic       tx_dav,
  input  logic       tx_cav,
  input  logic       tx_flag,
  output logic       tx_rfd,      // ready for data
  output ftype_t     tx_ftype,    // frame type being issued (observation)
  output logic       tx_inv,      // issued frame is inverted (observation)
  output logic       tx_load,     // frame issue strobe, bit-clock domain
  output logic signed [7:0] tx_rd, // running disparity (observation)
  output logic       sclk,        // transmit bit clock
  // serial side
  output logic       dout,        // serial line out
  input  logic [1:0] insel,       // 0 line, 1 loopback, 2/3 equalized
  input  logic       din,         // serial line in
  input  logic       lin,         // loopback in
  input  logic       ein,         // equalizer output
  // receive user side
  output logic       rclk,        // recovered bit clock
  output dfield_t    rx_d,
  output logic       rx_dav,
  output logic       rx_cav,
  output logic       rx_flag,
  output logic       rx_ferr,
  output ftype_t     rx_ftype,
  output logic       rx_strb,
  output logic       rx_locked,
  output logic       rx_fdet,     // loop in frequency detect mode
  output logic       rx_fd_active,// frequency detector drives the loop
  output logic [1:0] smc_state,
  output real        rx_f_mhz     // VCO frequency (model), for observation
);
  logic pd_valid, pd_late, fd_up, fd_dn, send_ff0, rfd;

  tx_clock_gen u_txpll (.strbin(strbin), .len24(mode20), .half_rate(half_rate), .sclk(sclk));

  cimt_tx u_tx (
    .sclk(sclk), .rst_n(rst_n), .strb(strbin), .half_rate(half_rate),
    .mode20(mode20), .d(tx_d), .dav(tx_dav), .cav(tx_cav), .flag(tx_flag),
    .flagsel(flagsel), .rfd(rfd), .send_ff0(send_ff0), .dout(dout),
    .ftype_sent(tx_ftype), .inv_sent(tx_inv), .load(tx_load), .run_disp(tx_rd));

  rx_loop_vco #(.F_INIT_MHZ(F_INIT_MHZ)) u_vco (
    .pd_valid(pd_valid), .pd_late(pd_late), .fd_up(fd_up), .fd_dn(fd_dn),
    .rclk(rclk), .f_mhz(rx_f_mhz));

  cimt_rx #(.LOCK_FRAMES(LOCK_FRAMES)) u_rx (
    .rclk(rclk), .rst_n(rst_n), .insel(insel), .din(din), .lin(lin), .ein(ein),
    .mode20(mode20), .flagsel(flagsel),
    .pd_valid(pd_valid), .pd_late(pd_late), .fd_up(fd_up), .fd_dn(fd_dn),
    .fd_active(rx_fd_active), .dout(rx_d), .dav(rx_dav), .cav(rx_cav), .flag(rx_flag), .ferr(rx_ferr),
    .ftype(rx_ftype), .ostrb(rx_strb), .locked(rx_locked),
    .fdet(rx_fdet), .send_ff0(send_ff0), .rfd(rfd), .smc_state(smc_state));

  assign tx_rfd       = rfd;
endmodule
