`timescale 1ps/1fs
// rx_frequency_detector: sequential frequency detector with gating.
//
// Used only while the start-up controller holds the loop in frequency
// detect mode, when the far end sends fill frames whose only rising edge
// is the master transition.  It is a tri-state (sequential) phase-frequency
// detector between two events in the recovered-clock domain: the rising
// edge of the retimed data (reference) and the recovered frame clock, taken
// as the cycle in which the bit after the master transition (C2) is
// expected.  If the reference comes first the VCO is slow (up), if the frame
// clock comes first it is fast (down); the second event returns the
// detector to idle.  The gating hands the loop filter to this detector while
// it is out of idle, i.e. while the two events fall in different bit
// periods, and leaves it to the bang-bang phase detector when they
// coincide: a gate flag is set by a comparison that found the events in
// different bit periods and cleared by one that found them together, and
// while it is set the phase detector's decisions are withheld from the loop
// filter (pd_valid_o low) and the detector's up/down drives it instead.
// Outside frequency detect mode the phase detector passes straight through.
// Measuring the phase error at one-bit resolution is this design's choice.
// Outputs are combinational from the registers.
module rx_frequency_detector (
  input  logic clk,        // recovered bit clock
  input  logic rst_n,
  input  logic en,         // frequency detect mode
  input  logic ref_ev,     // rising edge of retimed data
  input  logic vco_ev,     // recovered frame clock (C2 slot)
  input  logic pd_valid,   // phase detector decision
  output logic fd_up,      // VCO too slow / late
  output logic fd_dn,      // VCO too fast / early
  output logic fd_active,  // gating: frequency detector drives the loop
  output logic pd_valid_o  // phase detector decision passed to the loop
);
  typedef enum logic [1:0] {PF_IDLE, PF_UP, PF_DN} pfd_t;
  pfd_t st;
  logic gate;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) st <= PF_IDLE;
    else if (!en) st <= PF_IDLE;
    else
      unique case ({ref_ev, vco_ev})
        2'b11:   st <= PF_IDLE; // both at once: aligned
        2'b10:   st <= (st == PF_DN) ? PF_IDLE : PF_UP;
        2'b01:   st <= (st == PF_UP) ? PF_IDLE : PF_DN;
        default: st <= st;
      endcase

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) gate <= 1'b0;
    else if (!en) gate <= 1'b0;
    else if (ref_ev && vco_ev && st == PF_IDLE) gate <= 1'b0;  // edges together
    else if (st != PF_IDLE) gate <= 1'b1;                      // edges apart

  assign fd_up      = en && st == PF_UP;
  assign fd_dn      = en && st == PF_DN;
  assign fd_active  = en && (gate || st != PF_IDLE);
  assign pd_valid_o = pd_valid && !fd_active;
endmodule
