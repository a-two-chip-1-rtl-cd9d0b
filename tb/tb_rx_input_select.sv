`timescale 1ps/1fs
// tb_rx_input_select: every select code with every input combination.
module tb_rx_input_select;
  int checks = 0, failures = 0;
  logic [1:0] sel;
  logic din, lin, ein, dsel;

  rx_input_select dut (.sel(sel), .din(din), .lin(lin), .ein(ein), .dsel(dsel));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 8; v++) begin
        logic e;
        sel = 2'(s); {ein, lin, din} = 3'(v);
        #10;
        e = (s == 0) ? v[0] : (s == 1) ? v[1] : v[2];
        checks++;
        if (dsel != e) begin failures++; $display("sel %0d in %b: %b", s, v, dsel); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
