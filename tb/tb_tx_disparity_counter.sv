`timescale 1ps/1fs
// tb_tx_disparity_counter: random frame disparities, with and without the
// update strobe; running value and sign compared with a reference sum.
module tb_tx_disparity_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, upd = 0, pos;
  logic signed [7:0] fd, rd;
  int ref_rd = 0;

  tx_disparity_counter #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .upd(upd), .frame_disp(fd), .rd(rd), .positive(pos));

  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      upd = $urandom_range(0, 3) != 0;
      // keep the reference within +-100 by steering the sign
      fd = 8'(($urandom_range(0, 12) * 2) * (ref_rd > 0 ? -1 : 1) + ($urandom_range(0, 1) ? 2 : -2));
      @(posedge clk);
      if (upd) ref_rd += fd;
      #1;
      checks++;
      if (rd != ref_rd || pos != (ref_rd > 0)) begin
        failures++; $display("rd %0d pos %0d, expected %0d", rd, pos, ref_rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
