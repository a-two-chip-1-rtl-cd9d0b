`timescale 1ps/1fs
// tb_tx_frame_encoder: random words, frame requests and controller states
// into the encoder; every issued frame compared with the reference code
// table, the conditional-invert rule and a reference running disparity.
// Also checks that the disparity stays within one frame length, that
// FF1H/FF1L alternate and that the toggled FLAG alternates.
module tb_tx_frame_encoder;
  import cimt_pkg::*;
  import cimt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, adv = 0;
  logic mode20, dav, cav, flag, flagsel, rfd, send_ff0;
  dfield_t d;
  frame_t  frame;
  ftype_t  ftype;
  logic    inverted;
  logic signed [7:0] rd;

  tx_frame_encoder dut (.clk(clk), .rst_n(rst_n), .adv(adv), .mode20(mode20), .d(d),
    .dav(dav), .cav(cav), .flag(flag), .flagsel(flagsel), .rfd(rfd), .send_ff0(send_ff0),
    .frame(frame), .ftype(ftype), .inverted(inverted), .rd(rd));

  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_rd = 0, n_inv = 0, n_true = 0, n_ff1 = 0;
  bit tflag = 0, ff1h = 1;

  initial begin
    {mode20, dav, cav, flag, flagsel, rfd, send_ff0} = '0;
    d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the first adv captures the first inputs; state is the reset state
    repeat (4000) begin
      bit [19:0] dd; bit m, dv, cv, fl, fs, rf, f0;
      int kind; bit [23:0] tf, ef; bit inv;
      dd = 20'($urandom); m = 1'($urandom); dv = $urandom_range(0, 3) != 0;
      cv = $urandom_range(0, 3) == 0; fl = 1'($urandom); fs = $urandom_range(0, 3) != 0;
      rf = $urandom_range(0, 5) != 0; f0 = 1'($urandom);
      @(negedge clk);
      d = dd; mode20 = m; dav = dv; cav = cv; flag = fl; flagsel = fs; rfd = rf; send_ff0 = f0;
      adv = 1;
      @(negedge clk);
      adv = 0;
      // reference
      if (!rf || (!cv && !dv)) kind = f0 ? 2 : (ff1h ? 3 : 4);
      else if (cv) kind = 1;
      else kind = 0;
      tf  = ref_true(kind, kind == 1 ? dd : dd, fs ? fl : tflag, m);
      if (kind == 0 && !m) tf[23:20] = 4'b0;
      inv = (kind <= 1) && ((ref_disp(tf, m) > 0) == (ref_rd > 0));
      ef  = inv ? ref_inv(tf, m) : tf;
      checks++;
      if (frame != ef || inverted != inv || rd != 8'(ref_rd)) begin
        failures++;
        $display("kind %0d m20 %0d: frame %h inv %0d rd %0d, expected %h %0d %0d",
                 kind, m, frame, inverted, rd, ef, inv, ref_rd);
      end
      checks++;
      if ((kind == 0 && ftype != FT_DATA) || (kind == 1 && ftype != FT_CTRL) ||
          (kind == 2 && ftype != FT_FF0) || (kind == 3 && ftype != FT_FF1H) ||
          (kind == 4 && ftype != FT_FF1L)) begin
        failures++; $display("type %0d, expected kind %0d", ftype, kind);
      end
      // this frame is issued at the next adv
      ref_rd += ref_disp(ef, m);
      if (kind == 0) tflag = ~tflag;
      if (kind >= 3) begin ff1h = ~ff1h; n_ff1++; end
      if (inv) n_inv++; else if (kind <= 1) n_true++;
      checks++;
      if (ref_rd > 24 || ref_rd < -24) begin failures++; $display("disparity %0d", ref_rd); end
    end
    checks++;
    if (n_inv == 0 || n_true == 0 || n_ff1 == 0) begin failures++; $display("coverage"); end
    $display("inverted %0d true %0d ff1 %0d", n_inv, n_true, n_ff1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
