`timescale 1ps/1fs
// tb_tx_serializer: frames sent at full-rate and half-rate strobes, 20- and
// 24-bit lengths; checks one load per frame period and every serial bit,
// D0 first.
module tb_tx_serializer;
  import cimt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, strb = 0, half = 0, load, sout;
  frame_t frame;
  int n = 20;

  tx_serializer dut (.clk(clk), .rst_n(rst_n), .strb(strb), .half_rate(half),
                     .frame(frame), .load(load), .sout(sout));

  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe: edge every n bit periods (full rate: rising edges only count)
  initial begin
    #2;
    forever begin
      #(n * 10 / (half ? 1 : 2)) strb = ~strb;
    end
  end

  frame_t exp_f;
  int idx = -1, last_load = -1, cyc = 0, nloads = 0, skip = 0;
  always @(posedge clk) begin
    cyc++;
    if (load) begin
      if (skip > 0) skip--;
      else if (last_load >= 0 && rst_n) begin
        checks++;
        if (cyc - last_load != n) begin failures++; $display("load period %0d", cyc - last_load); end
      end
      last_load = cyc;
      exp_f = frame;
      idx = 0;
      nloads++;
    end
  end
  always @(negedge clk) begin
    if (idx >= 0 && idx < n) begin
      checks++;
      if (sout != exp_f[idx]) begin failures++; $display("bit %0d: %0d expected %0d", idx, sout, exp_f[idx]); end
      idx++;
    end
  end
  always @(posedge clk) if (load) #1 frame = frame_t'($urandom);

  initial begin
    frame = frame_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge strb);
    n = 24; skip = 3;
    repeat (100) @(posedge strb);
    half = 1; skip = 3;
    repeat (100) @(posedge strb);
    checks++;
    if (nloads < 350) begin failures++; $display("only %0d loads", nloads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
