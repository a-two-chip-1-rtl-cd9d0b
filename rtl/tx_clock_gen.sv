`timescale 1ps/1fs
// tx_clock_gen: behavioural model of the transmitter's PLL / clock
// generator (analog; not synthesizable).
//
// The transmitter multiplies the user's frame-rate clock (or a clock at half
// the frame rate) up to the serial bit clock.  This model measures the
// period T of 'strbin' between rising edges and produces a bit clock of
// period T/M (M = frame length, doubled at half rate) whose rising edges
// fall a quarter bit after each strobe edge and every bit period after
// that; each new strobe edge re-times the schedule, so the clock stays
// phase locked to the strobe and follows changes of its period within a
// bit.  Loop dynamics of the real PLL are not modelled.  No clock is
// produced before two strobe edges have been seen.
// Full- and half-rate strobes are published features; the quarter-bit
// phase offset is this design's choice.
module tx_clock_gen (
  input  logic strbin,      // user clock
  input  logic len24,       // 24-bit frames
  input  logic half_rate,   // strbin at half the frame rate
  output logic sclk         // bit clock
);

  realtime t_last, t_per;
  logic    seen;

  initial begin
    sclk   = 1'b0;
    seen   = 1'b0;
    t_last = 0;
    t_per  = 0;
  end

  // strobe period measurement (a model process, hence blocking updates)
  always @(posedge strbin) begin
    if (seen) t_per = $realtime - t_last;
    t_last = $realtime;
    seen   = 1'b1;
  end

  initial begin
    int          k;
    int unsigned nb;
    realtime     tb, tr;
    forever begin
      if (t_per <= 0) @(posedge strbin);
      else begin
        nb = (len24 ? 24 : 20) * (half_rate ? 2 : 1);
        tb = t_per / nb;
        k  = $rtoi(($realtime - t_last - tb / 4) / tb);
        if ($realtime - t_last - tb / 4 < 0) k = -1;
        k  = k + 1;
        tr = t_last + tb / 4 + k * tb;
        #(tr - $realtime) sclk = 1'b1;
        #(tb / 2) sclk = 1'b0;
      end
    end
  end
endmodule
