`timescale 1ps/1fs
// tx_frame_encoder: CIMT frame encoder of the transmitter.
//
// Once per frame (adv, the serializer taking the current frame) the encoder
// captures the user's word, DAV/CAV/FLAG and the start-up controller's
// RFD/FF0 request, and from then on presents the line frame built from
// them on 'frame'.  It chooses the frame type (fill while RFD is low, else
// control if CAV, else data if DAV, else fill), builds the true form
// (D-field plus C-field, see cimt_pkg), asks the majority gate for the
// frame's polarity and the disparity counter for the sign of the running
// disparity, and sends the frame complemented when the two signs agree.
// Fill frames are never inverted; FF1H and FF1L are sent in alternation.
// With flagsel low the FLAG bit is not taken from the user but toggled on
// every data frame, which lets the receiver check it.
// Timing: a word captured at one adv leaves on the next adv.  The frame
// type priority (control before data) is this design's choice.
module tx_frame_encoder
  import cimt_pkg::*;
(
  input  logic        clk,          // bit clock
  input  logic        rst_n,
  input  logic        adv,          // current frame issued; capture next
  input  logic        mode20,       // 1: 20-bit data (24-bit frame)
  input  dfield_t     d,            // data word, or control payload
  input  logic        dav,          // data available
  input  logic        cav,          // control available
  input  logic        flag,         // user FLAG bit
  input  logic        flagsel,      // 1: FLAG is a data bit, 0: toggled
  input  logic        rfd,          // ready for data (from the SMC)
  input  logic        send_ff0,     // SMC asks for FF0 (else FF1)
  output frame_t      frame,        // line frame, bit 0 first
  output ftype_t      ftype,        // its type
  output logic        inverted,     // sent in complemented form
  output logic signed [7:0] rd      // running disparity before this frame
);
  // captured inputs
  dfield_t d_q;
  logic    dav_q, cav_q, flag_q, flagsel_q, rfd_q, ff0_q, mode20_q;
  // coder state
  logic    tflag;      // internally toggled flag
  logic    ff1_heavy;  // next FF1 is the heavy one

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_q <= '0; dav_q <= 1'b0; cav_q <= 1'b0; flag_q <= 1'b0;
      flagsel_q <= 1'b0; rfd_q <= 1'b0; ff0_q <= 1'b1; mode20_q <= 1'b0;
    end else if (adv) begin
      d_q <= d; dav_q <= dav; cav_q <= cav; flag_q <= flag;
      flagsel_q <= flagsel; rfd_q <= rfd; ff0_q <= send_ff0; mode20_q <= mode20;
    end

  frame_t     true_frame;
  logic       heavy, rd_pos, is_code;
  logic signed [7:0] fdisp;

  always_comb begin
    if (!rfd_q)      ftype = ff0_q ? FT_FF0 : (ff1_heavy ? FT_FF1H : FT_FF1L);
    else if (cav_q)  ftype = FT_CTRL;
    else if (dav_q)  ftype = FT_DATA;
    else             ftype = ff0_q ? FT_FF0 : (ff1_heavy ? FT_FF1H : FT_FF1L);

    unique case (ftype)
      FT_DATA: true_frame = place_cfield(d_q, cfield_data(flagsel_q ? flag_q : tflag), mode20_q);
      FT_CTRL: true_frame = place_cfield(ctrl_dfield(d_q, mode20_q), CFIELD_CTRL, mode20_q);
      default: true_frame = fill_frame(ftype, mode20_q);
    endcase
  end

  tx_majority #(.N(MAXN)) u_maj (
    .frame(true_frame), .len24(mode20_q), .heavy(heavy), .disparity(fdisp));

  assign is_code  = (ftype == FT_DATA) || (ftype == FT_CTRL);
  assign inverted = is_code && (heavy == rd_pos);
  assign frame    = inverted ? (~true_frame & frame_mask(mode20_q)) : true_frame;

  tx_disparity_counter #(.W(8)) u_rd (
    .clk(clk), .rst_n(rst_n), .upd(adv),
    .frame_disp(inverted ? -fdisp : fdisp), .rd(rd), .positive(rd_pos));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tflag     <= 1'b0;
      ff1_heavy <= 1'b1;
    end else if (adv) begin
      if (ftype == FT_DATA) tflag <= ~tflag;
      if (ftype == FT_FF1H || ftype == FT_FF1L) ff1_heavy <= ~ff1_heavy;
    end
endmodule
