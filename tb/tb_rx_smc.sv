`timescale 1ps/1fs
// tb_rx_smc: random status sequences into the start-up controller, compared
// state by state with a reference transition table; also the scripted
// start-up FF0 -> FF1 -> FF1 -> ready and a restart on FF0.
module tb_rx_smc;
  import cimt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sv = 0, fdet, ff0, rfd;
  rxstat_t st = ST_FE;
  logic [1:0] state;

  rx_smc dut (.clk(clk), .rst_n(rst_n), .svalid(sv), .status(st), .fdet(fdet),
              .send_ff0(ff0), .rfd(rfd), .state(state));

  always #5 clk = ~clk;
  initial begin
    #(10.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: 0 ACQ, 1 LCK, 2 PHS, 3 RDY; status 0 FE, 1 DATA, 2 FF0, 3 FF1
  int tbl[4][4] = '{'{0, 0, 1, 1}, '{0, 2, 1, 2}, '{0, 3, 0, 3}, '{0, 3, 0, 3}};
  int s = 0;
  int seen[4] = '{0, 0, 0, 0};

  task automatic step(input int x, input bit valid);
    @(negedge clk); st = rxstat_t'(x); sv = valid;
    @(negedge clk); sv = 0;
    if (valid) s = tbl[s][x];
    checks++;
    if (state != 2'(s) || fdet != (s <= 1) || ff0 != (s == 0) || rfd != (s == 3)) begin
      failures++; $display("status %0d: state %0d fdet %0d ff0 %0d rfd %0d, expected state %0d", x, state, fdet, ff0, rfd, s);
    end
    seen[s]++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(2, 1); step(3, 1); step(3, 1); step(1, 1);
    checks++;
    if (!rfd) begin failures++; $display("scripted start-up did not reach ready"); end
    step(2, 1);
    checks++;
    if (!ff0 || rfd) begin failures++; $display("FF0 did not restart"); end
    repeat (3000) step($urandom_range(0, 3), $urandom_range(0, 3) != 0);
    foreach (seen[i]) begin checks++; if (seen[i] == 0) begin failures++; $display("state %0d unseen", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
