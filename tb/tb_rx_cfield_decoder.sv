`timescale 1ps/1fs
// tb_rx_cfield_decoder: frames of every kind from the reference encoder, in
// true and inverted form, both lengths, plus random and corrupted frames.
// Checks frame class, inversion and FLAG; a random frame must be classed by
// the reference rules; in toggle mode, a FLAG that fails to alternate must
// give a frame error.
module tb_rx_cfield_decoder;
  import cimt_pkg::*;
  import cimt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, fvalid = 0, m20 = 0, flagsel = 1;
  frame_t frame = '0;
  ftype_t ft;
  logic inv, flag;

  rx_cfield_decoder dut (.clk(clk), .rst_n(rst_n), .fvalid(fvalid), .frame(frame), .mode20(m20),
    .flagsel(flagsel), .ftype(ft), .inv(inv), .flag(flag));

  always #5 clk = ~clk;
  initial begin
    #(10.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference classifier: -1 FE, 0 data, 1 control, 2 FF0, 3 FF1H, 4 FF1L
  function automatic int ref_class(input bit [23:0] f, input bit m, output bit ri, output bit rf);
    int n; bit c0, c1, c2, c3;
    n = nd(m); c0 = f[n]; c1 = f[n+1]; c2 = f[n+2]; c3 = f[n+3];
    ri = 0; rf = 0;
    if (c1 == c2) return -1;
    if (c0 == c3) begin
      ri = !c0;
      rf = ri ? !c2 : c2;
      return 0;
    end
    if (!c0 && !c1 && c2 && c3) begin
      if (f[n/2-1] == 0 && f[n/2] == 1) return 1;
      for (int k = 2; k <= 4; k++) if (f == ref_true(k, 0, 0, m)) return k;
      return -1;
    end
    if (c0 && c1 && !c2 && !c3 && f[n/2-1] == 1 && f[n/2] == 0) begin ri = 1; return 1; end
    return -1;
  endfunction

  int cnt[6] = '{0, 0, 0, 0, 0, 0};
  task automatic apply(input bit [23:0] f, input bit m);
    int k; bit ri, rf; ftype_t e;
    @(negedge clk);
    frame = f; m20 = m;
    #1;
    k = ref_class(f, m, ri, rf);
    e = (k == -1) ? FT_FE : (k == 0) ? FT_DATA : (k == 1) ? FT_CTRL :
        (k == 2) ? FT_FF0 : (k == 3) ? FT_FF1H : FT_FF1L;
    checks++;
    if (ft != e || (k >= 0 && k <= 1 && inv != ri) || (k == 0 && flag != rf)) begin
      failures++; $display("frame %h m20 %0d: type %0d inv %0d flag %0d, expected %0d %0d %0d",
                           f, m, ft, inv, flag, e, ri, rf);
    end
    cnt[k + 1]++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      bit m; int k; bit [23:0] f;
      m = 1'($urandom); k = $urandom_range(0, 5);
      if (k == 5) f = 24'($urandom) & (m ? 24'hffffff : 24'h0fffff);
      else begin
        f = ref_true(k, 20'($urandom), 1'($urandom), m);
        if (k <= 1 && $urandom_range(0, 1)) f = ref_inv(f, m);
        if ($urandom_range(0, 9) == 0) f[$urandom_range(0, m ? 23 : 19)] ^= 1'b1;
      end
      apply(f, m);
    end
    foreach (cnt[i]) begin
      checks++;
      if (cnt[i] == 0) begin failures++; $display("class %0d never seen", i - 1); end
    end
    // toggle mode: flags 0,1,0,1,0 are fine, then a repeated 0 is an error
    flagsel = 0;
    begin
      bit [23:0] f; bit fl;
      fl = 0;
      for (int i = 0; i < 6; i++) begin
        @(negedge clk);
        m20 = 0; frame = ref_true(0, 20'($urandom), fl, 0);
        fvalid = 1;
        #1;
        checks++;
        if ((i < 5 && ft != FT_DATA) || (i == 5 && ft != FT_FE)) begin
          failures++; $display("toggle check %0d: type %0d", i, ft);
        end
        if (i < 4) fl = ~fl;
      end
      @(negedge clk) fvalid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
