`timescale 1ps/1fs
// tb_glink_link: end-to-end test of a full-duplex link built from two
// glink_node instances (A and B) with their serial lines crossed.
//
// Node A's user clock runs at exactly 1.5 GBd / frame length, node B's about
// 0.67 % slower, so each receiver must acquire frequency with its frequency
// detector before phase lock.  Phases:
//   1. 16-bit words, FLAG as a data bit, full-rate strobes: start-up
//      handshake, then random data and control words both ways, checked in
//      order against the words the user presented; then the A->B line is
//      held low for a while, which must make B see frame errors, both ends
//      restart the handshake and data flow again.
//   2. Reset; 20-bit words, FLAG toggled by the transmitters and checked by
//      the receivers, node A strobed at half the frame rate, node B's
//      receiver fed through the equalized-input path of its selector.
//   3. Reset; node A alone in loopback (its receiver on its own transmitter).
// Every mechanism (FDET/PHASE modes, frequency-detector gating, each SMC
// state, FF0/FF1H/FF1L, true and inverted data and control frames, frame
// error recovery, half-rate strobe, loopback, input selection) is counted
// and must occur.  Running disparity must stay within one frame length, and
// the recovered clock must match the sender's bit rate.
module tb_glink_link;
  import cimt_pkg::*;

  localparam real F_A = 1500.0;        // MHz bit rate of A
  localparam real F_B = 1490.0;        // MHz bit rate of B

  int checks = 0, failures = 0;

  logic rst_n = 1'b0;
  logic mode20 = 1'b0, flagsel = 1'b1, half_a = 1'b0;
  logic strb_a = 1'b0, strb_b = 1'b0;
  logic [1:0] insel_a = 2'd0, insel_b = 2'd0;
  logic cut_ab = 1'b0;
  logic allow_user = 1'b0;
  int   phase = 0;

  dfield_t d_a, d_b;
  logic dav_a = 0, cav_a = 0, flag_a = 0, dav_b = 0, cav_b = 0, flag_b = 0;

  logic dout_a, dout_b, line_ab, sclk_a, sclk_b, rclk_a, rclk_b;
  logic rfd_a, rfd_b, load_a, load_b, inv_a, inv_b;
  ftype_t ft_txa, ft_txb, ft_rxa, ft_rxb;
  logic signed [7:0] rd_a, rd_b;
  dfield_t rxd_a, rxd_b;
  logic rdav_a, rcav_a, rflag_a, rferr_a, rstrb_a, lock_a, fdet_a, fda_a;
  logic rdav_b, rcav_b, rflag_b, rferr_b, rstrb_b, lock_b, fdet_b, fda_b;
  logic [1:0] st_a, st_b;
  real        fmhz_a, fmhz_b;

  assign line_ab = cut_ab ? 1'b0 : dout_a;

  glink_node u_a (
    .rst_n(rst_n), .mode20(mode20), .flagsel(flagsel), .strbin(strb_a), .half_rate(half_a),
    .tx_d(d_a), .tx_dav(dav_a), .tx_cav(cav_a), .tx_flag(flag_a), .tx_rfd(rfd_a),
    .tx_ftype(ft_txa), .tx_inv(inv_a), .tx_load(load_a), .tx_rd(rd_a), .sclk(sclk_a),
    .dout(dout_a), .insel(insel_a), .din(dout_b), .lin(dout_a), .ein(dout_b),
    .rclk(rclk_a), .rx_d(rxd_a), .rx_dav(rdav_a), .rx_cav(rcav_a), .rx_flag(rflag_a),
    .rx_ferr(rferr_a), .rx_ftype(ft_rxa), .rx_strb(rstrb_a), .rx_locked(lock_a),
    .rx_fdet(fdet_a), .rx_fd_active(fda_a), .smc_state(st_a), .rx_f_mhz(fmhz_a));

  glink_node u_b (
    .rst_n(rst_n), .mode20(mode20), .flagsel(flagsel), .strbin(strb_b), .half_rate(1'b0),
    .tx_d(d_b), .tx_dav(dav_b), .tx_cav(cav_b), .tx_flag(flag_b), .tx_rfd(rfd_b),
    .tx_ftype(ft_txb), .tx_inv(inv_b), .tx_load(load_b), .tx_rd(rd_b), .sclk(sclk_b),
    .dout(dout_b), .insel(insel_b), .din(line_ab), .lin(dout_b), .ein(line_ab),
    .rclk(rclk_b), .rx_d(rxd_b), .rx_dav(rdav_b), .rx_cav(rcav_b), .rx_flag(rflag_b),
    .rx_ferr(rferr_b), .rx_ftype(ft_rxb), .rx_strb(rstrb_b), .rx_locked(lock_b),
    .rx_fdet(fdet_b), .rx_fd_active(fda_b), .smc_state(st_b), .rx_f_mhz(fmhz_b));

  // ---------------- user clocks
  function automatic realtime strb_half(input real fmhz, input logic m20, input logic half);
    return (m20 ? 24.0 : 20.0) * 1.0e6 / fmhz / 2.0 * (half ? 2.0 : 1.0);
  endfunction
  initial forever begin #(strb_half(F_A, mode20, half_a)) strb_a = ~strb_a; end
  initial forever begin #(strb_half(F_B, mode20, 1'b0))   strb_b = ~strb_b; end

  // ---------------- user words: new random word at every strobe edge used
  function automatic dfield_t mask_d(input dfield_t d, input logic m20);
    return m20 ? d : (d & 20'h0ffff);
  endfunction
  function automatic dfield_t mask_c(input dfield_t d, input logic m20);
    return m20 ? (d & 20'h3ffff) : (d & 20'h03fff);
  endfunction

  task automatic new_word(output dfield_t d, output logic dav, output logic cav,
                          output logic flag);
    int r;
    r    = $urandom_range(0, 9);
    d    = dfield_t'($urandom);
    flag = $urandom_range(0, 1) == 1;
    dav  = allow_user && r < 6;
    cav  = allow_user && r >= 6 && r < 8;
  endtask

  always @(posedge strb_a) new_word(d_a, dav_a, cav_a, flag_a);
  always @(negedge strb_a) if (half_a) new_word(d_a, dav_a, cav_a, flag_a);
  always @(posedge strb_b) new_word(d_b, dav_b, cav_b, flag_b);

  // ---------------- scoreboards: what each transmitter issued, in order
  typedef struct packed { logic ctl; dfield_t d; logic flag; } word_t;
  word_t q_ab[$], q_ba[$];
  word_t cap_a, cap_b;
  logic  capv_a = 0, capv_b = 0, capdav_a, capcav_a, capdav_b, capcav_b;

  int n_inv_data = 0, n_true_data = 0, n_inv_ctl = 0, n_true_ctl = 0;
  int n_ff0 = 0, n_ff1h = 0, n_ff1l = 0, n_rx_words = 0, n_rx_ctl = 0;
  int n_fd_cycles = 0, n_pd_mode_frames = 0, n_ferr_b = 0, n_restart = 0;
  int n_state[4] = '{0, 0, 0, 0};
  int n_half_frames = 0, n_loop_rdy = 0, n_eq_words = 0, n_flag_toggle_words = 0;
  int n_disp_bad = 0;

  // issue tracking for node A's transmitter
  always @(posedge sclk_a) if (load_a) begin
    if (capv_a) begin
      if (ft_txa == FT_DATA) begin
        checks++;
        if (!(capdav_a && !capcav_a)) begin failures++; $display("A sent data not requested"); end
        q_ab.push_back(cap_a);
        if (inv_a) n_inv_data++; else n_true_data++;
      end else if (ft_txa == FT_CTRL) begin
        checks++;
        if (!capcav_a) begin failures++; $display("A sent control not requested"); end
        q_ab.push_back('{ctl: 1'b1, d: mask_c(cap_a.d, mode20), flag: 1'b0});
        if (inv_a) n_inv_ctl++; else n_true_ctl++;
      end else begin
        if (inv_a) begin failures++; $display("A inverted a fill frame"); end
        if (ft_txa == FT_FF0) n_ff0++;
        if (ft_txa == FT_FF1H) n_ff1h++;
        if (ft_txa == FT_FF1L) n_ff1l++;
      end
      if (half_a) n_half_frames++;
    end
    cap_a    <= '{ctl: 1'b0, d: mask_d(d_a, mode20), flag: flag_a};
    capdav_a <= dav_a; capcav_a <= cav_a; capv_a <= 1'b1;
    if (rd_a > 24 || rd_a < -24) n_disp_bad++;
  end

  always @(posedge sclk_b) if (load_b) begin
    if (capv_b) begin
      if (ft_txb == FT_DATA) q_ba.push_back(cap_b);
      else if (ft_txb == FT_CTRL) q_ba.push_back('{ctl: 1'b1, d: mask_c(cap_b.d, mode20), flag: 1'b0});
    end
    cap_b    <= '{ctl: 1'b0, d: mask_d(d_b, mode20), flag: flag_b};
    capdav_b <= dav_b; capcav_b <= cav_b; capv_b <= 1'b1;
    if (rd_b > 24 || rd_b < -24) n_disp_bad++;
  end

  // receive checking
  logic scoring = 1'b0;
  task automatic rx_check(input string nm, ref word_t q[$], input dfield_t d,
                          input logic ctl, input logic flag);
    word_t w;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("%s: word received with none outstanding", nm); return;
    end
    w = q.pop_front();
    if (w.ctl != ctl || w.d != d || (!ctl && flagsel && w.flag != flag)) begin
      failures++;
      $display("%s: got ctl=%0d d=%h flag=%0d, expected ctl=%0d d=%h flag=%0d",
               nm, ctl, d, flag, w.ctl, w.d, w.flag);
    end
  endtask

  logic last_flag_b = 1'b0, have_flag_b = 1'b0;
  always @(posedge rclk_b) if (rstrb_b) begin
    if (scoring && (rdav_b || rcav_b)) begin
      rx_check("B", q_ab, rxd_b, rcav_b, rflag_b);
      n_rx_words++;
      if (rcav_b) n_rx_ctl++;
      if (insel_b == 2'd2) n_eq_words++;
    end
    if (rdav_b && !flagsel) begin
      if (have_flag_b && rflag_b != last_flag_b) n_flag_toggle_words++;
      last_flag_b = rflag_b; have_flag_b = 1'b1;
    end
    if (rferr_b && scoring) n_ferr_b++;
  end
  always @(posedge rclk_a) if (rstrb_a) begin
    if (scoring && (rdav_a || rcav_a) && insel_a == 2'd0) rx_check("A", q_ba, rxd_a, rcav_a, rflag_a);
    if (!fdet_a) n_pd_mode_frames++;
  end
  always @(posedge rclk_b) begin
    if (fda_b) n_fd_cycles++;
    n_state[st_b]++;
  end
  always @(posedge rclk_a) if (fda_a) n_fd_cycles++;

  // ---------------- helpers
  task automatic wait_ready(input int max_us, input string what);
    realtime t0;
    t0 = $realtime;
    while (!(rfd_a && rfd_b) && ($realtime - t0) < max_us * 1.0e6) #1000;
    checks++;
    if (!(rfd_a && rfd_b)) begin
      failures++; $display("%s: link did not come up (states A=%0d B=%0d)", what, st_a, st_b);
      // nothing later can work without the link: stop here
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end else $display("%s: link up at %0.3f us", what, $realtime / 1.0e6);
  endtask

  task automatic flush();
    q_ab.delete(); q_ba.delete();
  endtask

  task automatic measure_rate(input string nm, input real fexp);
    realtime t0, t1;
    @(posedge rclk_b) t0 = $realtime;
    repeat (2000) @(posedge rclk_b);
    t1 = $realtime;
    checks++;
    if ((2000.0e6 / (t1 - t0) - fexp) > 0.002 * fexp || (fexp - 2000.0e6 / (t1 - t0)) > 0.002 * fexp) begin
      failures++; $display("%s: recovered clock %f MHz, expected %f", nm, 2000.0e6 / (t1 - t0), fexp);
    end else $display("%s: recovered clock %f MHz", nm, 2000.0e6 / (t1 - t0));
  endtask

  task automatic run_traffic(input int frames);
    allow_user = 1'b1;
    repeat (frames) @(posedge strb_b);
    allow_user = 1'b0;
    repeat (20) @(posedge strb_b);
  endtask

  task automatic do_reset();
    scoring = 1'b0;
    rst_n = 1'b0;
    capv_a = 1'b0; capv_b = 1'b0;
    have_flag_b = 1'b0;
    flush();
    #100000;
    rst_n = 1'b1;
  endtask

  // ---------------- watchdog
  initial begin
    #(3000.0e6);
    failures++;
    $display("watchdog expired in phase %0d", phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // phase 1
    phase = 1;
    do_reset();
    wait_ready(100, "phase 1 start-up");
    scoring = 1'b1;
    measure_rate("B rx", F_A);
    run_traffic(2000);
    checks++;
    if (q_ab.size() != 0 || q_ba.size() != 0) begin
      failures++; $display("words left outstanding: %0d %0d", q_ab.size(), q_ba.size());
    end
    // break the A->B line
    cut_ab = 1'b1;
    repeat (40) @(posedge strb_b);
    checks++;
    if (rfd_a || rfd_b) begin failures++; $display("RFD still high after line cut"); end
    else n_restart++;
    cut_ab = 1'b0;
    scoring = 1'b0;
    wait_ready(100, "phase 1 recovery");
    flush();
    scoring = 1'b1;
    run_traffic(300);
    checks++;
    if (q_ab.size() != 0 || q_ba.size() != 0) begin
      failures++; $display("words left outstanding: %0d %0d", q_ab.size(), q_ba.size());
    end

    // phase 2
    phase = 2;
    mode20 = 1'b1; flagsel = 1'b0; half_a = 1'b1; insel_b = 2'd2;
    do_reset();
    wait_ready(100, "phase 2 start-up");
    scoring = 1'b1;
    run_traffic(600);
    checks++;
    if (q_ab.size() != 0 || q_ba.size() != 0) begin
      failures++; $display("words left outstanding: %0d %0d", q_ab.size(), q_ba.size());
    end

    // phase 3: A in loopback
    phase = 3;
    mode20 = 1'b0; flagsel = 1'b1; half_a = 1'b0; insel_b = 2'd0; insel_a = 2'd1;
    do_reset();
    begin
      realtime t0;
      t0 = $realtime;
      while (!rfd_a && ($realtime - t0) < 400.0e6) #1000;
    end
    checks++;
    if (rfd_a) n_loop_rdy++; else begin failures++; $display("loopback did not come up"); end

    // mechanisms
    begin
      string nm[$];
      int    cnt[$];
      nm = '{"inverted data", "true data", "inverted control", "true control", "FF0 sent",
             "FF1H sent", "FF1L sent", "words received", "control received",
             "frequency detector cycles", "phase-mode frames", "frame errors seen",
             "restart after line cut", "SMC ACQ", "SMC LCK", "SMC PHS", "SMC RDY",
             "half-rate frames", "loopback ready", "equalized-path words", "toggled-flag words"};
      cnt = '{n_inv_data, n_true_data, n_inv_ctl, n_true_ctl, n_ff0, n_ff1h, n_ff1l,
              n_rx_words, n_rx_ctl, n_fd_cycles, n_pd_mode_frames, n_ferr_b, n_restart,
              n_state[0], n_state[1], n_state[2], n_state[3], n_half_frames, n_loop_rdy,
              n_eq_words, n_flag_toggle_words};
      foreach (nm[i]) begin
        checks++;
        $display("  %-28s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin failures++; $display("mechanism never happened: %s", nm[i]); end
      end
    end
    checks++;
    if (n_disp_bad != 0) begin failures++; $display("running disparity out of range %0d times", n_disp_bad); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
