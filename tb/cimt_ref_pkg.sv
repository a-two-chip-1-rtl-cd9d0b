`timescale 1ps/1fs
// cimt_ref_pkg: independent reference model of the CIMT line code used by
// the testbenches.  It writes the code table out as explicit C-field bit
// strings (C0 first) instead of sharing the design's helper functions.
package cimt_ref_pkg;

  // kinds: 0 data, 1 control, 2 FF0, 3 FF1H, 4 FF1L
  function automatic int nd(input bit m20); return m20 ? 20 : 16; endfunction
  function automatic int nf(input bit m20); return m20 ? 24 : 20; endfunction

  // True-form frame, bit i = i-th bit on the line.
  function automatic bit [23:0] ref_true(input int kind, input bit [19:0] d,
                                         input bit flag, input bit m20);
    bit [23:0] f;
    bit [3:0]  c;     // c[0] = C0
    int n, h, j;
    n = nd(m20); h = n / 2; f = '0;
    case (kind)
      0: begin
        for (int i = 0; i < n; i++) f[i] = d[i];
        c = flag ? {1'b1, 1'b1, 1'b0, 1'b1} : {1'b1, 1'b0, 1'b1, 1'b1};  // C3..C0
      end
      1: begin
        j = 0;
        for (int i = 0; i < n; i++)
          if (i == h - 1) f[i] = 0;
          else if (i == h) f[i] = 1;
          else begin f[i] = d[j]; j++; end
        c = {1'b1, 1'b1, 1'b0, 1'b0};
      end
      default: begin
        int k;
        // FF0 has half the frame high: C2, C3 and the leading D bits
        k = (kind == 2) ? (nf(m20) / 2 - 2) : (kind == 3) ? (nf(m20) / 2 - 1) : (nf(m20) / 2 - 3);
        for (int i = 0; i < n; i++) f[i] = (i < k);
        c = {1'b1, 1'b1, 1'b0, 1'b0};
      end
    endcase
    for (int i = 0; i < 4; i++) f[n + i] = c[i];
    return f;
  endfunction

  function automatic int ref_disp(input bit [23:0] f, input bit m20);
    int o;
    o = 0;
    for (int i = 0; i < nf(m20); i++) o += f[i];
    return 2 * o - nf(m20);
  endfunction

  function automatic bit [23:0] ref_inv(input bit [23:0] f, input bit m20);
    bit [23:0] g;
    g = '0;
    for (int i = 0; i < nf(m20); i++) g[i] = ~f[i];
    return g;
  endfunction

  // control payload width
  function automatic int ncp(input bit m20); return nd(m20) - 2; endfunction

endpackage
