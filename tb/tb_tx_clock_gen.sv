`timescale 1ps/1fs
// tb_tx_clock_gen: the clock generator model at 1.5 GBd: 20 and 24 bit
// clocks per full-rate strobe period, 40 per half-rate period, bit period
// equal to the strobe period over the multiplication factor.
module tb_tx_clock_gen;
  int checks = 0, failures = 0;
  logic strb = 0, len24 = 0, half = 0, sclk;
  realtime tper = 13333.333;

  tx_clock_gen dut (.strbin(strb), .len24(len24), .half_rate(half), .sclk(sclk));

  initial forever #(tper / 2) strb = ~strb;
  initial begin
    #(100.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt = 0;
  realtime t_prev = 0, per;
  always @(posedge sclk) begin
    per = $realtime - t_prev;
    t_prev = $realtime;
    cnt++;
  end

  task automatic measure(input int expn, input string nm);
    int c0; realtime t0;
    repeat (4) @(posedge strb);       // settle
    @(posedge strb); c0 = cnt; t0 = $realtime;
    repeat (10) @(posedge strb);
    checks++;
    if (cnt - c0 != 10 * expn) begin failures++; $display("%s: %0d clocks, expected %0d", nm, cnt - c0, 10 * expn); end
    @(posedge sclk); @(posedge sclk);
    checks++;
    if (per > tper / expn * 1.001 || per < tper / expn * 0.999) begin
      failures++; $display("%s: period %f, expected %f", nm, per, tper / expn);
    end
  endtask

  initial begin
    measure(20, "20-bit");
    len24 = 1; measure(24, "24-bit");
    tper = 16000.0; measure(24, "24-bit 1.5 GBd");
    half = 1; tper = 32000.0; measure(48, "half rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
