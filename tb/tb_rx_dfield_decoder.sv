`timescale 1ps/1fs
// tb_rx_dfield_decoder: data and control frames from the reference encoder
// in true and inverted form, both lengths; the decoder must return the
// original word or the packed control payload.
module tb_rx_dfield_decoder;
  import cimt_pkg::*;
  import cimt_ref_pkg::*;
  int checks = 0, failures = 0;
  frame_t frame;
  logic m20, inv;
  ftype_t ft;
  dfield_t dout;

  rx_dfield_decoder dut (.frame(frame), .mode20(m20), .inv(inv), .ftype(ft), .dout(dout));

  initial begin
    #(10.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      bit m, i, c; bit [19:0] d, e; bit [23:0] f;
      m = 1'($urandom); i = 1'($urandom); c = 1'($urandom);
      d = 20'($urandom);
      e = c ? (m ? d & 20'h3ffff : d & 20'h03fff) : (m ? d : d & 20'h0ffff);
      f = ref_true(c ? 1 : 0, d, 0, m);
      if (i) f = ref_inv(f, m);
      frame = f; m20 = m; inv = i; ft = c ? FT_CTRL : FT_DATA;
      #10;
      checks++;
      if (dout != e) begin failures++; $display("frame %h: %h expected %h", f, dout, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
