`timescale 1ps/1fs
// tb_glink_rates: the link across its operating range, and the recovered
// clock's hunting jitter.
//
// Two glink_node instances at default parameters, serial lines crossed.
// Three runs, each from reset with the receivers' VCOs left wherever the
// previous run put them (the first run starts at the 1500 MHz default):
//   1. 1500 MBd, 16-bit words (17 with FLAG)
//   2.  960 MBd, 20-bit words: 800 Mb/s of payload in 40 M frames/s
//   3.  700 MBd, 16-bit words, the low end of the range
// Node B's user clock is 0.2 % slower than A's (0.2 % faster in the
// 700 MBd run, so that both ends stay inside the range).  In each run the link must
// come up (both RFD high) within 400 us, and then node A sends a counting
// sequence of data words for 20 us, which node B must receive without a
// gap.  During that time the phase of B's recovered clock is measured
// against A's bit clock at every rising edge; its rms deviation is printed
// and, at 1.5 GBd, must be below 18 ps.  For the bang-bang loop this is
// expected near 2*BB_STEP*M/F/sqrt(12) (about 8 ps at M = 20, 1.5 GBd).
// The recovered bit rate must equal A's within 0.01 %.
module tb_glink_rates;
  import cimt_pkg::*;

  int checks = 0, failures = 0;
  real f_a = 1500.0;                   // MHz, bit rate of node A
  real f_b = 1497.0;                   // MHz, bit rate of node B
  logic rst_n = 1'b0, mode20 = 1'b0;
  logic strb_a = 1'b0, strb_b = 1'b0;
  logic allow = 1'b0;
  dfield_t d_a = '0;
  logic dav_a = 1'b0;

  logic dout_a, dout_b, sclk_a, sclk_b, rclk_a, rclk_b;
  logic rfd_a, rfd_b, load_a, load_b, inv_a, inv_b;
  ftype_t ft_txa, ft_txb, ft_rxa, ft_rxb;
  logic signed [7:0] rd_a, rd_b;
  dfield_t rxd_a, rxd_b;
  logic rdav_a, rcav_a, rflag_a, rferr_a, rstrb_a, lock_a, fdet_a, fda_a;
  logic rdav_b, rcav_b, rflag_b, rferr_b, rstrb_b, lock_b, fdet_b, fda_b;
  logic [1:0] st_a, st_b;
  real        fmhz_a, fmhz_b;

  glink_node u_a (
    .rst_n(rst_n), .mode20(mode20), .flagsel(1'b1), .strbin(strb_a), .half_rate(1'b0),
    .tx_d(d_a), .tx_dav(dav_a), .tx_cav(1'b0), .tx_flag(1'b0), .tx_rfd(rfd_a),
    .tx_ftype(ft_txa), .tx_inv(inv_a), .tx_load(load_a), .tx_rd(rd_a), .sclk(sclk_a),
    .dout(dout_a), .insel(2'd0), .din(dout_b), .lin(dout_a), .ein(dout_b),
    .rclk(rclk_a), .rx_d(rxd_a), .rx_dav(rdav_a), .rx_cav(rcav_a), .rx_flag(rflag_a),
    .rx_ferr(rferr_a), .rx_ftype(ft_rxa), .rx_strb(rstrb_a), .rx_locked(lock_a),
    .rx_fdet(fdet_a), .rx_fd_active(fda_a), .smc_state(st_a), .rx_f_mhz(fmhz_a));

  glink_node u_b (
    .rst_n(rst_n), .mode20(mode20), .flagsel(1'b1), .strbin(strb_b), .half_rate(1'b0),
    .tx_d(20'h0), .tx_dav(1'b0), .tx_cav(1'b0), .tx_flag(1'b0), .tx_rfd(rfd_b),
    .tx_ftype(ft_txb), .tx_inv(inv_b), .tx_load(load_b), .tx_rd(rd_b), .sclk(sclk_b),
    .dout(dout_b), .insel(2'd0), .din(dout_a), .lin(dout_b), .ein(dout_a),
    .rclk(rclk_b), .rx_d(rxd_b), .rx_dav(rdav_b), .rx_cav(rcav_b), .rx_flag(rflag_b),
    .rx_ferr(rferr_b), .rx_ftype(ft_rxb), .rx_strb(rstrb_b), .rx_locked(lock_b),
    .rx_fdet(fdet_b), .rx_fd_active(fda_b), .smc_state(st_b), .rx_f_mhz(fmhz_b));

  // user clocks: one rising edge per frame
  function automatic realtime half_per(input real fmhz);
    return (mode20 ? 24.0 : 20.0) * 1.0e6 / fmhz / 2.0;
  endfunction
  initial forever begin #(half_per(f_a)) strb_a = ~strb_a; end
  initial forever begin #(half_per(f_b)) strb_b = ~strb_b; end

  initial begin
    #(2.0e9);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A: counting data words
  always @(posedge strb_a) begin
    d_a   = mask(d_a + 20'd1);
    dav_a = allow;
  end
  function automatic dfield_t mask(input dfield_t d);
    return mode20 ? d : (d & 20'h0ffff);
  endfunction

  // B: received words must count up by one
  bit measuring = 0, have_prev = 0;
  dfield_t prev;
  int n_words = 0, n_gaps = 0;
  always @(posedge rclk_b) if (rstrb_b && rdav_b && measuring) begin
    if (have_prev && rxd_b != mask(prev + 20'd1)) n_gaps++;
    prev = rxd_b; have_prev = 1; n_words++;
  end

  // phase of B's recovered clock against A's bit clock
  realtime t_sa = 0, t_sa_prev = 0, ph0 = 0;
  real s1 = 0, s2 = 0;
  int  ns = 0, n_sa = 0, n_rb = 0;
  always @(posedge sclk_a) begin
    t_sa_prev = t_sa; t_sa = $realtime;
    if (measuring) n_sa++;
  end
  always @(posedge rclk_b) if (measuring && t_sa_prev > 0) begin
    realtime tb, ph;
    tb = t_sa - t_sa_prev;
    ph = $realtime - t_sa;
    if (ns == 0) ph0 = ph;
    ph = ph - ph0;
    while (ph >  tb / 2) ph -= tb;
    while (ph < -tb / 2) ph += tb;
    s1 += ph; s2 += ph * ph; ns++;
    n_rb++;
  end

  task automatic run(input real f, input bit m20, input string name);
    realtime t0; real rms, ratio;
    rst_n = 0; allow = 0; measuring = 0;
    f_a = f; f_b = (f < 800.0) ? f * 1.002 : f * 0.998; mode20 = m20;
    #(200.0e3);
    rst_n = 1;
    t0 = $realtime;
    while (!(rfd_a && rfd_b) && ($realtime - t0) < 400.0e6) #1000;
    checks++;
    if (!(rfd_a && rfd_b)) begin
      failures++; $display("%s: link did not come up (states A=%0d B=%0d)", name, st_a, st_b);
      return;
    end
    $display("%s: link up after %0.1f us", name, ($realtime - t0) / 1.0e6);
    allow = 1;
    #(5.0e6);
    have_prev = 0; n_words = 0; n_gaps = 0; s1 = 0; s2 = 0; ns = 0; n_sa = 0; n_rb = 0;
    measuring = 1;
    #(20.0e6);
    measuring = 0;
    rms   = $sqrt(s2 / ns - (s1 / ns) * (s1 / ns));
    ratio = real'(n_rb) / real'(n_sa);
    $display("%s: %0d words, %0d gaps, rms phase jitter %0.2f ps, bit-rate ratio %0.6f",
             name, n_words, n_gaps, rms, ratio);
    checks++;
    if (n_words < 100 || n_gaps != 0) begin failures++; $display("%s: data not received in sequence", name); end
    checks++;
    if (ratio < 0.9999 || ratio > 1.0001) begin failures++; $display("%s: recovered rate off", name); end
    if (f == 1500.0) begin
      checks++;
      if (rms >= 18.0) begin failures++; $display("%s: jitter above 18 ps rms", name); end
    end
  endtask

  initial begin
    run(1500.0, 1'b0, "1500 MBd 16-bit");
    run(960.0,  1'b1, "960 MBd 20-bit");
    run(700.0,  1'b0, "700 MBd 16-bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
