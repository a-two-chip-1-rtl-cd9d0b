`timescale 1ps/1fs
// rx_lock_detector: frame-lock monitor of the receiver.
//
// Watches the classification of each received frame.  After LOCK_FRAMES
// frames in a row with a valid master transition and C-field the receiver
// counts as locked; one bad frame drops lock and restarts the count.  While
// unlocked every frame is reported to the start-up controller as a frame
// error; when locked the frame's own class is reported (data and control
// both as DATA, FF1H/FF1L as FF1).  The status is registered and valid with
// 'svalid', one cycle after the frame.  LOCK_FRAMES is this design's choice.
module rx_lock_detector
  import cimt_pkg::*;
#(
  parameter int unsigned LOCK_FRAMES = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fvalid,
  input  ftype_t  ftype,
  output logic    locked,
  output rxstat_t status,
  output logic    svalid
);
  logic [7:0] cnt;
  logic       lock_nxt;

  always_comb begin
    lock_nxt = (ftype != FT_FE) && (9'(cnt) + 9'd1 >= 9'(LOCK_FRAMES));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      locked <= 1'b0;
      status <= ST_FE;
      svalid <= 1'b0;
    end else begin
      svalid <= fvalid;
      if (fvalid) begin
        if (ftype == FT_FE) cnt <= '0;
        else if (9'(cnt) < 9'(LOCK_FRAMES)) cnt <= cnt + 8'd1;
        locked <= lock_nxt;
        if (!lock_nxt) status <= ST_FE;
        else
          unique case (ftype)
            FT_DATA, FT_CTRL: status <= ST_DATA;
            FT_FF0:           status <= ST_FF0;
            default:          status <= ST_FF1;
          endcase
      end
    end
endmodule
