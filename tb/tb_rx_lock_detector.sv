`timescale 1ps/1fs
// tb_rx_lock_detector: random runs of good and bad frames; lock must come
// exactly on the LOCK_FRAMES-th good frame in a row, go with the first bad
// one, and the status must be FE while unlocked and the frame's class when
// locked.  Run with the default LOCK_FRAMES.
module tb_rx_lock_detector;
  import cimt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, fvalid = 0, locked, svalid;
  ftype_t ft = FT_FE;
  rxstat_t st;

  rx_lock_detector dut (.clk(clk), .rst_n(rst_n), .fvalid(fvalid), .ftype(ft),
                        .locked(locked), .status(st), .svalid(svalid));

  always #5 clk = ~clk;
  initial begin
    #(10.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LF = 32;
  int run = 0, nlock = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      ftype_t t; rxstat_t es; bit el;
      t = ($urandom_range(0, 60) == 0) ? FT_FE : ftype_t'($urandom_range(1, 5));
      @(negedge clk); ft = t; fvalid = 1;
      @(negedge clk); fvalid = 0;
      run = (t == FT_FE) ? 0 : run + 1;
      el = run >= LF;
      es = !el ? ST_FE : (t == FT_DATA || t == FT_CTRL) ? ST_DATA : (t == FT_FF0) ? ST_FF0 : ST_FF1;
      checks++;
      if (locked != el || st != es || !svalid) begin
        failures++; $display("run %0d: locked %0d status %0d, expected %0d %0d", run, locked, st, el, es);
      end
      if (el) nlock++;
    end
    checks++;
    if (nlock == 0) begin failures++; $display("never locked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
