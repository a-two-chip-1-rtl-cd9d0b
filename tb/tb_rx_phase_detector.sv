`timescale 1ps/1fs
// tb_rx_phase_detector: two detectors watch the same random line with
// master transitions of both polarities, one copy of the line 200 ps
// late and one 200 ps early against a 1000 ps bit clock.  The late line's
// bit boundaries follow the falling clock edge, so its detector must say
// "early" at every frame; the early line's must say "late".  Decisions come
// once per 20-bit frame and the retimed data must equal the bits sent.
module tb_rx_phase_detector;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, din_l = 0, din_e = 0;
  logic [4:0] pos = 0;
  logic rdata_l, rise_l, pdv_l, late_l, rdata_e, rise_e, pdv_e, late_e;
  localparam int N = 20, C1 = 17;

  rx_phase_detector u_l (.clk(clk), .rst_n(rst_n), .din(din_l), .pos(pos), .c1_pos(5'(C1)),
    .rdata(rdata_l), .rise(rise_l), .pd_valid(pdv_l), .pd_late(late_l));
  rx_phase_detector u_e (.clk(clk), .rst_n(rst_n), .din(din_e), .pos(pos), .c1_pos(5'(C1)),
    .rdata(rdata_e), .rise(rise_e), .pd_valid(pdv_e), .pd_late(late_e));

  // rising edges at 500 + 1000 m, falling edges at 1000 m
  always #500 clk = ~clk;
  initial begin
    #(50.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bits[$];
  function automatic bit next_bit(input int j);
    bit b;
    b = 1'($urandom);
    if (j % N == C1 + 1) b = ~bits[j - 1];     // master transition
    return b;
  endfunction
  // bit j nominally spans [1000 j, 1000 j + 1000)
  initial begin
    for (int j = 0; j < 4000; j++) bits.push_back(next_bit(j));
    din_e = bits[0];
    #800;
    for (int j = 1; j < 4000; j++) begin din_e = bits[j]; #1000; end
  end
  initial begin
    #200;
    for (int j = 0; j < 4000; j++) begin din_l = bits[j]; #1000; end
  end

  int m = 0, nvalid = 0, last_valid = -1, nrise = 0;
  always @(posedge clk) begin
    if (rst_n && m > 3 && m < 3990) begin
      checks++;
      if (rdata_l != bits[m - 1] || rdata_e != bits[m - 1]) begin
        failures++; $display("retimed bit %0d wrong", m - 1);
      end
      if (rise_l) nrise++;
      checks++;
      if (rise_l != (bits[m - 1] && !bits[m - 2])) begin failures++; $display("rise flag at %0d", m); end
    end
    if (rst_n && m > 3 && m < 3990 && pdv_l) begin
      checks++;
      if (late_l != 1'b0 || late_e != 1'b1 || !pdv_e) begin
        failures++; $display("bit %0d: late line says %0d, early line says %0d", m, late_l, late_e);
      end
      if (last_valid >= 0) begin
        checks++;
        if (m - last_valid != N) begin failures++; $display("decision period %0d", m - last_valid); end
      end
      last_valid = m;
      nvalid++;
    end
    #1 pos = 5'(m % N);
    m++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (m == 3995);
    checks++;
    if (nvalid < 190 || nrise == 0) begin failures++; $display("only %0d decisions", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
