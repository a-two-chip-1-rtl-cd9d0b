`timescale 1ps/1fs
// tb_cimt_tx: the transmitter logic on an ideal bit clock.  Random data
// and control words are presented at each strobe edge; the serial output is
// cut into frames at the frame boundaries, decoded by the testbench's own
// C-field rules and compared with the words presented one frame earlier.
// Also checks the fill frames while RFD is low (FF0 when asked for, else
// FF1H and FF1L in turn), one frame per strobe period and the line's
// running disparity.  Three runs, each from reset: 16-bit at full rate,
// 20-bit with the half-rate strobe, 16-bit with the half-rate strobe.
module tb_cimt_tx;
  import cimt_pkg::*;
  import cimt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, strb = 0, half = 0, m20 = 0;
  dfield_t d;
  logic dav = 0, cav = 0, flag = 0, flagsel = 1, rfd = 0, ff0 = 1;
  logic dout, load, inv;
  ftype_t ft;
  logic signed [7:0] rdisp;

  cimt_tx dut (.sclk(clk), .rst_n(rst_n), .strb(strb), .half_rate(half), .mode20(m20),
    .d(d), .dav(dav), .cav(cav), .flag(flag), .flagsel(flagsel), .rfd(rfd),
    .send_ff0(ff0), .dout(dout), .ftype_sent(ft), .inv_sent(inv), .load(load),
    .run_disp(rdisp));

  always #5 clk = ~clk;        // bit clock, 10 time units
  initial begin
    #2;
    forever #(nf(m20) * 5 * (half ? 2 : 1)) strb = ~strb;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // words presented at strobe edges
  typedef struct { int kind; bit [19:0] d; bit flag; } w_t;
  w_t pres[$];
  always @(strb) begin
    d = dfield_t'($urandom);
    flag = 1'($urandom);
    dav = $urandom_range(0, 2) != 0;
    cav = $urandom_range(0, 4) == 0;
  end
  // what the encoder captures at a load is sent from the next load on
  w_t prev_w; bit have_prev = 0; bit last_h = 0;
  always @(posedge clk) if (load && rst_n) begin
    w_t w;
    w.kind = (!rfd || (!cav && !dav)) ? (ff0 ? -2 : -1) : cav ? 1 : 0;
    w.d = m20 ? d : d & 20'h0ffff;
    if (w.kind == 1) w.d = m20 ? d & 20'h3ffff : d & 20'h03fff;
    w.flag = flag;
    if (have_prev) pres.push_back(prev_w);
    prev_w = w; have_prev = 1;
  end

  // cut the line into frames: bit k of a frame appears k+1 cycles after load
  bit [23:0] fr; int idx = -1, nfr = 0, line_disp = 0, n_fill = 0, n_ff0 = 0, n_data = 0, n_ctl = 0;
  int last_load = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (idx >= 0 && idx < nf(m20)) begin fr[idx] = dout; idx++; end
    if (idx == nf(m20)) begin check_frame(fr); idx = -1; end
    if (load && rst_n) begin
      if (last_load > 0) begin
        checks++;
        if (cyc - last_load != nf(m20)) begin failures++; $display("frame period %0d", cyc - last_load); end
      end
      last_load = cyc;
      idx = 0;
      fr = '0;
    end
  end

  task automatic check_frame(input bit [23:0] f);
    int n; bit [3:0] c; w_t w; bit [19:0] dd; int j;
    dd = '0;
    n = nd(m20);
    for (int i = 0; i < 4; i++) c[i] = f[n + i];
    line_disp += ref_disp(f, m20);
    nfr++;
    if (nfr == 1) begin              // first frame: reset state, no word yet
      last_h = (f == ref_true(3, 0, 0, m20));
      return;
    end
    w = pres.pop_front();
    checks++;
    if (w.kind == -2) begin
      if (f != ref_true(2, 0, 0, m20)) begin failures++; $display("expected FF0, got %h", f); end
      n_ff0++;
    end else if (w.kind == -1) begin
      if (f != ref_true(last_h ? 4 : 3, 0, 0, m20)) begin
        failures++; $display("expected %s, got %h", last_h ? "FF1L" : "FF1H", f);
      end
      last_h = (f == ref_true(3, 0, 0, m20));
      n_fill++;
    end else begin
      for (int i = 0; i < n; i++) dd[i] = f[i] ^ (c[0] == c[3] ? ~c[0] : c[0]);
      if (w.kind == 0) begin
        n_data++;
        if (c[0] != c[3] || c[1] == c[2] || dd != w.d || (c[2] ~^ c[0]) != w.flag) begin
          failures++; $display("data frame %h, expected word %h flag %0d", f, w.d, w.flag);
        end
      end else begin
        bit [19:0] p; p = '0; j = 0;
        n_ctl++;
        for (int i = 0; i < n; i++) if (i != n/2 - 1 && i != n/2) begin p[j] = dd[i]; j++; end
        if (c[0] == c[3] || c[1] == c[2] || p != w.d || dd[n/2-1] != 0 || dd[n/2] != 1) begin
          failures++; $display("control frame %h, expected payload %h", f, w.d);
        end
      end
    end
    checks++;
    if (line_disp > 24 || line_disp < -24) begin failures++; $display("line disparity %0d", line_disp); end
  endtask

  task automatic run(input bit m, input bit h);
    @(negedge clk);
    rst_n = 0; m20 = m; half = h; rfd = 0; ff0 = 1;
    pres.delete(); have_prev = 0; nfr = 0; line_disp = 0; idx = -1; last_load = -1;
    n_fill = 0; n_ff0 = 0; n_data = 0; n_ctl = 0;
    repeat (2) @(negedge strb);      // strobe period of the new mode
    rst_n = 1;                       // strobe low: no load until its next edge
    repeat (20) @(posedge strb);
    @(negedge strb); ff0 = 0;
    repeat (20) @(posedge strb);
    @(negedge strb); rfd = 1;
    repeat (500) @(posedge strb);
    checks++;
    if (n_ff0 == 0 || n_fill == 0 || n_data == 0 || n_ctl == 0) begin
      failures++; $display("coverage %0d %0d %0d %0d", n_ff0, n_fill, n_data, n_ctl);
    end
    $display("m20 %0d half %0d: FF0 %0d FF1 %0d data %0d control %0d", m, h, n_ff0, n_fill, n_data, n_ctl);
  endtask

  initial begin
    run(0, 0);
    run(1, 1);
    run(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
