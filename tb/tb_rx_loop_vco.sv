`timescale 1ps/1fs
// tb_rx_loop_vco: the loop filter / VCO model at 1.5 GHz.  Checks the
// bang-bang input's +-0.1 % frequency step, the integral step per phase
// decision and per frequency-detector bit, and that the output period
// follows the frequency.
module tb_rx_loop_vco;
  int checks = 0, failures = 0;
  logic pdv = 0, late = 0, up = 0, dn = 0, rclk;
  real  f;

  rx_loop_vco dut (.pd_valid(pdv), .pd_late(late), .fd_up(up), .fd_dn(dn), .rclk(rclk), .f_mhz(f));

  initial begin
    #(100.0e6);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b) < tol && (b - a) < tol;
  endfunction

  task automatic measure(input real fexp, input string nm);
    realtime t0, t1;
    @(posedge rclk); t0 = $realtime;
    repeat (100) @(posedge rclk);
    t1 = $realtime;
    checks++;
    if (!near(100.0e6 / (t1 - t0), fexp, fexp * 1.0e-5)) begin
      failures++; $display("%s: %f MHz, expected %f", nm, 100.0e6 / (t1 - t0), fexp);
    end
  endtask

  real fi;
  initial begin
    fi = 1500.0;
    measure(fi * 0.999, "reset, bang-bang low");
    // one late decision: speed up
    @(negedge rclk); pdv = 1; late = 1; @(negedge rclk); pdv = 0;
    fi = fi * 1.0002;
    checks++;
    if (!near(f, fi, 1.0e-6)) begin failures++; $display("integral %f expected %f", f, fi); end
    measure(fi * 1.001, "bang-bang high");
    @(negedge rclk); pdv = 1; late = 0; @(negedge rclk); pdv = 0;
    fi = fi * 0.9998;
    measure(fi * 0.999, "bang-bang low again");
    // frequency detector up for 1000 bits
    @(negedge rclk); up = 1;
    repeat (1000) @(negedge rclk);
    up = 0;
    for (int i = 0; i < 1000; i++) fi = fi * 1.00002;
    checks++;
    if (!near(f, fi, 1.0e-3)) begin failures++; $display("after FD up %f expected %f", f, fi); end
    measure(fi * 1.001, "after FD up");
    @(negedge rclk); dn = 1;
    repeat (500) @(negedge rclk);
    dn = 0;
    for (int i = 0; i < 500; i++) fi = fi * 0.99998;
    measure(fi * 0.999, "after FD down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
