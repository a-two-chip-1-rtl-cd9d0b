`timescale 1ps/1fs
// cimt_rx: the receiver chip's logic, running on the recovered bit clock.
//
// Data path: input selector -> two sampling latches (phase detector) ->
// demultiplexer with the frame clock -> C-field decoder and D-field decoder.
// The bang-bang phase detector and the sequential frequency detector
// produce the loop-filter drive signals (pd_*, fd_*) for the analog loop
// filter and VCO, which are outside this module and return the recovered
// clock 'rclk'.  The lock detector and the start-up state machine decide
// the loop mode (fdet) and the fill frame / RFD of the co-located
// transmitter.
// Outputs: after each frame, one cycle later, 'ostrb' pulses with the
// decoded word on 'dout' and DAV/CAV/FLAG/frame-error flags; DAV and CAV
// are only raised while the receiver is locked.
// The block partition follows the published receiver; gating DAV/CAV with
// lock and the output register stage are this design's choices.
module cimt_rx
  import cimt_pkg::*;
#(
  parameter int unsigned LOCK_FRAMES = 32
) (
  input  logic       rclk,        // recovered bit clock from the VCO
  input  logic       rst_n,
  input  logic [1:0] insel,       // 0 line, 1 loopback, 2/3 equalized
  input  logic       din,
  input  logic       lin,
  input  logic       ein,
  input  logic       mode20,
  input  logic       flagsel,     // 0: FLAG toggles and is checked
  // loop filter drive
  output logic       pd_valid,    // gated phase-detector decision
  output logic       pd_late,
  output logic       fd_up,
  output logic       fd_dn,
  output logic       fd_active,   // gating: frequency detector has the loop
  // user side
  output dfield_t    dout,
  output logic       dav,
  output logic       cav,
  output logic       flag,
  output logic       ferr,        // frame error
  output ftype_t     ftype,       // class of the last frame
  output logic       ostrb,       // output word valid
  output logic       locked,
  // start-up state machine
  output logic       fdet,
  output logic       send_ff0,
  output logic       rfd,
  output logic [1:0] smc_state
);
  logic       dsel, rdata, rise, fvalid, pd_raw, inv_w, flag_w, svalid;
  logic [4:0] pos, c1_pos, c2_pos;
  frame_t     frame;
  ftype_t     ft_w;
  dfield_t    d_w;
  rxstat_t    status;

  assign c1_pos = mode20 ? 5'd21 : 5'd17;
  assign c2_pos = c1_pos + 5'd1;

  rx_input_select u_sel (.sel(insel), .din(din), .lin(lin), .ein(ein), .dsel(dsel));

  rx_phase_detector u_pd (
    .clk(rclk), .rst_n(rst_n), .din(dsel), .pos(pos), .c1_pos(c1_pos),
    .rdata(rdata), .rise(rise), .pd_valid(pd_raw), .pd_late(pd_late));

  rx_frequency_detector u_fd (
    .clk(rclk), .rst_n(rst_n), .en(fdet), .ref_ev(rise),
    .vco_ev(pos == c2_pos), .pd_valid(pd_raw), .fd_up(fd_up), .fd_dn(fd_dn),
    .fd_active(fd_active), .pd_valid_o(pd_valid));

  rx_demux u_dmx (
    .clk(rclk), .rst_n(rst_n), .mode20(mode20), .rdata(rdata), .pos(pos),
    .frame(frame), .fvalid(fvalid));

  rx_cfield_decoder u_cdec (
    .clk(rclk), .rst_n(rst_n), .fvalid(fvalid), .frame(frame), .mode20(mode20),
    .flagsel(flagsel), .ftype(ft_w), .inv(inv_w), .flag(flag_w));

  rx_dfield_decoder u_ddec (
    .frame(frame), .mode20(mode20), .inv(inv_w), .ftype(ft_w), .dout(d_w));

  rx_lock_detector #(.LOCK_FRAMES(LOCK_FRAMES)) u_lock (
    .clk(rclk), .rst_n(rst_n), .fvalid(fvalid), .ftype(ft_w),
    .locked(locked), .status(status), .svalid(svalid));

  rx_smc u_smc (
    .clk(rclk), .rst_n(rst_n), .svalid(svalid), .status(status),
    .fdet(fdet), .send_ff0(send_ff0), .rfd(rfd), .state(smc_state));

  always_ff @(posedge rclk or negedge rst_n)
    if (!rst_n) begin
      dout <= '0; dav <= 1'b0; cav <= 1'b0; flag <= 1'b0;
      ferr <= 1'b0; ftype <= FT_FE; ostrb <= 1'b0;
    end else begin
      ostrb <= fvalid;
      if (fvalid) begin
        dout  <= d_w;
        ftype <= ft_w;
        flag  <= flag_w && ft_w == FT_DATA;
        dav   <= ft_w == FT_DATA && locked;
        cav   <= ft_w == FT_CTRL && locked;
        ferr  <= ft_w == FT_FE;
      end
    end
endmodule
