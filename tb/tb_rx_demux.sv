`timescale 1ps/1fs
// tb_rx_demux: random retimed bits in both frame lengths; every frame must
// appear whole, bit 0 first, with one 'fvalid' per frame length, and 'pos'
// must count the frame positions.
module tb_rx_demux;
  import cimt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, m20 = 0, rdata = 0, fvalid;
  logic [4:0] pos;
  frame_t frame;

  rx_demux dut (.clk(clk), .rst_n(rst_n), .mode20(m20), .rdata(rdata), .pos(pos),
                .frame(frame), .fvalid(fvalid));

  always #5 clk = ~clk;
  initial begin
    #(10.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [23:0] cur, done_q[$];
  int k = 0, nfr = 0;
  always @(posedge clk) if (rst_n) begin
    int n;
    n = m20 ? 24 : 20;
    checks++;
    if (pos != 5'(k)) begin failures++; $display("pos %0d expected %0d", pos, k); end
    if (fvalid) begin
      checks++;
      if (done_q.size() == 0 || frame != done_q.pop_front()) begin failures++; $display("frame %h wrong", frame); end
      nfr++;
    end
    cur[k] = rdata;
    k++;
    if (k == n) begin done_q.push_back(cur); cur = '0; k = 0; end
    #1 rdata = 1'($urandom);
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2000) @(posedge clk);
    wait (k == 0);
    @(negedge clk);
    m20 = 1;
    repeat (2400) @(posedge clk);
    checks++;
    if (nfr < 180) begin failures++; $display("only %0d frames", nfr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
