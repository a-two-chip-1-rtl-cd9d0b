`timescale 1ps/1fs
// tb_tx_majority: random and corner frames through the majority gate;
// disparity and polarity compared with a bit-by-bit count.
module tb_tx_majority;
  int checks = 0, failures = 0;
  logic [23:0] frame;
  logic len24, heavy;
  logic signed [7:0] disp;

  tx_majority #(.N(24)) dut (.frame(frame), .len24(len24), .heavy(heavy), .disparity(disp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [23:0] f, input logic l);
    int o, n, e;
    frame = f; len24 = l;
    #10;
    n = l ? 24 : 20; o = 0;
    for (int i = 0; i < n; i++) if (f[i]) o++;
    e = 2 * o - n;
    checks++;
    if (disp != e || heavy != (e > 0)) begin
      failures++;
      $display("frame %h len24=%0d: disp %0d heavy %0d, expected %0d", f, l, disp, heavy, e);
    end
  endtask

  initial begin
    one(24'h000000, 1); one(24'hffffff, 1); one(24'hfff000, 1); one(24'h0fffff, 0);
    one(24'hf003ff, 0); one(24'h0003ff, 0); one(24'h0007ff, 0);
    repeat (2000) one(24'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
