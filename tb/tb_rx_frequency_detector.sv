`timescale 1ps/1fs
// tb_rx_frequency_detector: frames of 20 cycles with the reference edge
// and the frame-clock event placed at chosen cycles.  Reference first must
// give 'up' for exactly the cycles between the two events, frame clock
// first 'down'; coincident events must release the gate so that phase
// detector decisions pass again; outside frequency-detect mode nothing is
// gated.  Checked against a cycle-by-cycle reference.
module tb_rx_frequency_detector;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, ref_ev = 0, vco_ev = 0, pdv = 0;
  logic up, dn, act, pdv_o;

  rx_frequency_detector dut (.clk(clk), .rst_n(rst_n), .en(en), .ref_ev(ref_ev), .vco_ev(vco_ev),
    .pd_valid(pdv), .fd_up(up), .fd_dn(dn), .fd_active(act), .pd_valid_o(pdv_o));

  always #5 clk = ~clk;
  initial begin
    #(10.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int st = 0; bit gate = 0;   // 0 idle 1 up 2 down
  int n_up = 0, n_dn = 0, n_pass = 0, n_block = 0;

  task automatic frame(input int r, input int v, input bit e);
    for (int c = 0; c < 20; c++) begin
      bit r_e, v_e, exp_up, exp_dn, exp_act, exp_pv, p;
      @(negedge clk);
      en = e; r_e = (c == r); v_e = (c == v); p = (c == 17);
      ref_ev = r_e; vco_ev = v_e; pdv = p;
      #1;
      exp_up = e && st == 1; exp_dn = e && st == 2;
      exp_act = e && (gate || st != 0); exp_pv = p && !exp_act;
      checks++;
      if (up != exp_up || dn != exp_dn || act != exp_act || pdv_o != exp_pv) begin
        failures++;
        $display("r=%0d v=%0d c=%0d: up %0d dn %0d act %0d pv %0d, expected %0d %0d %0d %0d",
                 r, v, c, up, dn, act, pdv_o, exp_up, exp_dn, exp_act, exp_pv);
      end
      if (up) n_up++;
      if (dn) n_dn++;
      if (p && pdv_o) n_pass++;
      if (p && !pdv_o) n_block++;
      // next state
      if (!e) begin st = 0; gate = 0; end
      else begin
        if (r_e && v_e && st == 0) gate = 0;
        else if (st != 0) gate = 1;
        if (r_e && v_e) st = 0;
        else if (r_e) st = (st == 2) ? 0 : 1;
        else if (v_e) st = (st == 1) ? 0 : 2;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) frame(18, 18, 1);       // aligned
    repeat (3) frame(12, 18, 1);       // reference 6 cycles early
    repeat (3) frame(18, 18, 1);
    repeat (3) frame(19, 15, 1);       // frame clock first
    repeat (2) frame(5, 18, 0);        // mode off: no gating
    repeat (200) frame($urandom_range(0, 19), $urandom_range(0, 19), $urandom_range(0, 7) != 0);
    checks++;
    if (n_up == 0 || n_dn == 0 || n_pass == 0 || n_block == 0) begin
      failures++; $display("coverage %0d %0d %0d %0d", n_up, n_dn, n_pass, n_block);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
