`timescale 1ps/1fs
// rx_loop_vco: behavioural model of the receiver's loop filter and VCO
// (analog; not synthesizable).
//
// The loop filter has two branches.  The bang-bang (proportional) branch
// drives the VCO's fast tuning input, which moves the VCO frequency by
// +-BB_STEP (about 0.1%) according to the last decision: the phase
// detector's late/early bit, or the frequency detector's up/down while the
// gating gives it the loop.  The integral branch integrates the same
// decisions onto the main tuning input: KI per phase-detector decision,
// KF per bit period while the frequency detector is active, both relative
// to the current frequency.  The main tuning range is F_MIN..F_MAX.  The
// frequency is recomputed at each rising edge of the output clock; the
// clock has a 50% duty cycle (the sampling scheme relies on it).
// Choose KI so that the figure of merit xi = 2*beta*tau/t_update stays
// above one, i.e. one frame of bang-bang walk-off dominates the integral
// branch's; the defaults give a ratio of BB_STEP/KI = 5.
module rx_loop_vco #(
  parameter real F_INIT_MHZ = 1500.0,   // main tuning at power-up
  parameter real F_MIN_MHZ  = 700.0,
  parameter real F_MAX_MHZ  = 1800.0,
  parameter real BB_STEP    = 0.001,    // +-0.1 % bang-bang range
  parameter real KI         = 0.0002,   // integral step per PD decision
  parameter real KF         = 0.00002   // integral step per bit, FD active
) (
  input  logic pd_valid,
  input  logic pd_late,     // 1: speed up
  input  logic fd_up,
  input  logic fd_dn,
  output logic rclk,
  output real  f_mhz        // present main tuning frequency (observation)
);

  real  f_int;
  logic bb;

  initial begin
    f_int = F_INIT_MHZ;
    bb    = 1'b0;
    rclk  = 1'b0;
  end

  // loop filter update at each VCO edge (a model process, hence blocking
  // updates); the drive signals read here are those registered on the
  // previous edge
  always @(posedge rclk) begin
    if (fd_up) begin
      bb    = 1'b1;
      f_int = f_int * (1.0 + KF);
    end else if (fd_dn) begin
      bb    = 1'b0;
      f_int = f_int * (1.0 - KF);
    end else if (pd_valid) begin
      bb    = pd_late;
      f_int = f_int * (pd_late ? 1.0 + KI : 1.0 - KI);
    end
    if (f_int > F_MAX_MHZ) f_int = F_MAX_MHZ;
    if (f_int < F_MIN_MHZ) f_int = F_MIN_MHZ;
  end

  assign f_mhz = f_int;

  initial begin
    realtime half;
    forever begin
      half = 1.0e6 / (f_int * (bb ? 1.0 + BB_STEP : 1.0 - BB_STEP)) / 2.0;
      #(half) rclk = 1'b1;
      #(half) rclk = 1'b0;
    end
  end
endmodule
