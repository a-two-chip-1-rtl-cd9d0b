`timescale 1ps/1fs
// tb_cimt_rx: the receiver logic on an ideal 1.5 GHz bit clock.
//
// The testbench plays the far-end transmitter.  Bits are driven 30% of a
// bit after each rising clock edge, aligned to the receiver's frame counter
// (read hierarchically), so the frame phase is already right and the test
// is about the logic, not the loop.  In each mode (16- and 20-bit) it sends
// 80 FF0 frames, then 80 FF1 frames, and checks the start-up controller has
// moved ACQ -> LCK -> PHS -> RDY with RFD high.  Then 600 random data and
// control frames, true or inverted at random, must come out in order with
// the right word, DAV/CAV and FLAG.  Finally a frame with C1 = C2 is sent:
// a frame error must be flagged, lock lost and the controller back in ACQ
// asking for FF0.  Phase-detector decisions must reach the loop in RDY.
module tb_cimt_rx;
  import cimt_pkg::*;
  import cimt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic rclk = 0, rst_n = 0, din = 0, m20 = 0;
  logic pd_valid, pd_late, fd_up, fd_dn, fd_active, dav, cav, flag, ferr, ostrb;
  logic locked, fdet, send_ff0, rfd;
  logic [1:0] smc_state;
  dfield_t dout;
  ftype_t ftype;

  cimt_rx dut (
    .rclk(rclk), .rst_n(rst_n), .insel(2'd0), .din(din), .lin(1'b0), .ein(1'b0),
    .mode20(m20), .flagsel(1'b1), .pd_valid(pd_valid), .pd_late(pd_late),
    .fd_up(fd_up), .fd_dn(fd_dn), .fd_active(fd_active), .dout(dout), .dav(dav),
    .cav(cav), .flag(flag), .ferr(ferr), .ftype(ftype), .ostrb(ostrb),
    .locked(locked), .fdet(fdet), .send_ff0(send_ff0), .rfd(rfd), .smc_state(smc_state));

  localparam realtime TBIT = 666.0;
  always #(TBIT / 2) rclk = ~rclk;
  initial begin
    #(200.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame source: a queue of frames to send; when it runs dry, the fill
  // frame of kind 'idle' (FF0 = 2, FF1H = 3) is sent
  bit [23:0] txq[$];
  int idle = 2;
  bit [23:0] cur = '0;
  // expected user words: {cav, dav, flag, word}
  bit [22:0] expq[$];
  int nstates[4] = '{0, 0, 0, 0};
  int npd_rdy = 0, nferr = 0;

  always @(posedge rclk) begin
    int idx;
    #(0.3 * TBIT);
    idx = (int'(dut.u_dmx.pos) + 1) % nf(m20);
    if (idx == 0) cur = (txq.size() != 0) ? txq.pop_front() : ref_true(idle, 0, 0, m20);
    din = cur[idx];
  end

  always @(posedge rclk) if (rst_n) begin
    nstates[smc_state]++;
    if (smc_state == 2'd3 && pd_valid) npd_rdy++;
    if (ostrb && ferr) nferr++;
    if (ostrb && (dav || cav)) begin
      bit [22:0] e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected word %h", dout); end
      else begin
        e = expq.pop_front();
        if ({cav, dav, flag, dout} != e) begin
          failures++;
          $display("got cav %0d dav %0d flag %0d %h, expected %h", cav, dav, flag, dout, e);
        end
      end
    end
  end

  task automatic wait_sent();
    while (txq.size() != 0) @(posedge rclk);
    repeat (3 * 24) @(posedge rclk);
  endtask

  task automatic run(input bit m);
    rst_n = 0; m20 = m; idle = 2;
    txq.delete(); expq.delete();
    repeat (4) @(posedge rclk);
    rst_n = 1;
    repeat (80) txq.push_back(ref_true(2, 0, 0, m));
    wait_sent();
    checks++;
    if (!locked || smc_state != 2'd1 || !fdet || send_ff0) begin
      failures++; $display("m20 %0d after FF0: locked %0d state %0d", m, locked, smc_state);
    end
    for (int i = 0; i < 80; i++) txq.push_back(ref_true((i % 2) ? 4 : 3, 0, 0, m));
    idle = 3;
    wait_sent();
    checks++;
    if (!locked || smc_state != 2'd3 || fdet || !rfd) begin
      failures++; $display("m20 %0d after FF1: locked %0d state %0d rfd %0d", m, locked, smc_state, rfd);
    end
    for (int i = 0; i < 600; i++) begin
      bit c, fl; bit [19:0] d, w; bit [23:0] f;
      c = ($urandom_range(0, 4) == 0); fl = 1'($urandom); d = 20'($urandom);
      f = ref_true(c ? 1 : 0, d, fl, m);
      if ($urandom_range(0, 1)) f = ref_inv(f, m);
      w = c ? (d & ((20'd1 << ncp(m)) - 1)) : (d & ((20'd1 << nd(m)) - 1));
      txq.push_back(f);
      expq.push_back({c, !c, !c && fl, w});
      if ($urandom_range(0, 7) == 0) txq.push_back(ref_true(3, 0, 0, m));
    end
    wait_sent();
    checks++;
    if (expq.size() != 0) begin failures++; $display("m20 %0d: %0d words not received", m, expq.size()); end
    begin
      bit [23:0] bad;
      bad = ref_true(0, 20'h5a5a5, 0, m);
      bad[nd(m) + 2] = bad[nd(m) + 1];
      nferr = 0;
      txq.push_back(bad);
      wait_sent();
    end
    checks++;
    if (nferr == 0 || smc_state != 2'd0 || !send_ff0 || !fdet || rfd) begin
      failures++; $display("m20 %0d after bad frame: ferr %0d state %0d", m, nferr, smc_state);
    end
  endtask

  initial begin
    run(0);
    run(1);
    foreach (nstates[i]) begin checks++; if (nstates[i] == 0) begin failures++; $display("state %0d never seen", i); end end
    checks++;
    if (npd_rdy == 0) begin failures++; $display("no phase decisions in RDY"); end
    $display("states %0d %0d %0d %0d, pd decisions in RDY %0d", nstates[0], nstates[1], nstates[2], nstates[3], npd_rdy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
