`timescale 1ps/1fs
// rx_phase_detector: sampling latches and bang-bang phase detector.
//
// Two matched samplers watch the selected input: the rising edge of the
// bit-rate VCO clock retimes the data (centre of each bit when locked), the
// falling edge samples the boundary between bits.  Only the boundary sample
// that follows the C1 bit, i.e. the master transition, is used (the
// decimation by the frame length M): it is XORed with C1 to remove the
// transition's polarity.  A result of 1 means the boundary sample already
// saw the new bit, so the clock is late and the VCO must speed up; 0 means
// early.  One decision (pd_valid, pd_late) per frame, registered.
// 'pos' is the frame position of the bit now held in 'rdata' (from the
// demultiplexer's frame counter).  'rise' flags a 0->1 step of the retimed
// data, used by the frequency detector.  The latches are edge-triggered flops
// here.
module rx_phase_detector (
  input  logic       clk,        // recovered bit clock
  input  logic       rst_n,
  input  logic       din,        // selected input
  input  logic [4:0] pos,        // frame position of rdata
  input  logic [4:0] c1_pos,     // position of C1 (16 or 20 + 1)
  output logic       rdata,      // retimed data
  output logic       rise,       // rdata went 0 -> 1
  output logic       pd_valid,   // one decision per frame
  output logic       pd_late     // 1: clock late, speed up
);
  logic e_q, d_prev;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rdata  <= 1'b0;
      d_prev <= 1'b0;
    end else begin
      rdata  <= din;
      d_prev <= rdata;
    end

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) e_q <= 1'b0;
    else        e_q <= din;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pd_valid <= 1'b0;
      pd_late  <= 1'b0;
    end else begin
      pd_valid <= (pos == c1_pos);
      if (pos == c1_pos) pd_late <= e_q ^ rdata;
    end

  assign rise = rdata & ~d_prev;
endmodule
