`timescale 1ps/1fs
// cimt_pkg: constants, types and helper functions of the conditional-invert
// master transition (CIMT) line code shared by the transmitter and receiver.
//
// A line frame is a D-field of 16 or 20 data bits followed by a 4-bit
// C-field C0..C3; bit 0 of a frame vector is the first bit on the line
// (D0 first, C3 last).  C1/C2 are always complementary and form the master
// transition; its polarity carries FLAG in data frames.  C0/C3 tell data
// from control/fill and true from inverted form.  The exact C-field values,
// the control-frame marker and the fill patterns below are this design's
// choices; the code rules they satisfy (complementary centre pair, single
// rising edge for fill, FF0 balanced, FF1L/FF1H two bits light/heavy,
// inversion of whole frames) follow the line-code description.
//
//   data, true      : C = 1,1,0,1 (FLAG=0)   1,0,1,1 (FLAG=1)
//   data, inverted  : bitwise complement of the whole true frame
//   control, true   : C = 0,0,1,1 ; D-field middle bits (N/2-1, N/2) = 0,1
//   control, invert : bitwise complement (C = 1,1,0,0, middle bits 1,0)
//   fill            : C = 0,0,1,1 ; D = ones from D0, then zeros
package cimt_pkg;

  localparam int unsigned MAXD = 20;  // widest D-field
  localparam int unsigned MAXN = 24;  // widest line frame

  typedef logic [MAXD-1:0] dfield_t;
  typedef logic [MAXN-1:0] frame_t;

  // Classification of a frame, as sent or as received.
  typedef enum logic [2:0] {
    FT_FE   = 3'd0,   // frame error (receiver only)
    FT_DATA = 3'd1,
    FT_CTRL = 3'd2,
    FT_FF0  = 3'd3,
    FT_FF1H = 3'd4,
    FT_FF1L = 3'd5
  } ftype_t;

  // Status the receiver hands to the start-up state machine.
  typedef enum logic [1:0] {
    ST_FE   = 2'd0,
    ST_DATA = 2'd1,
    ST_FF0  = 2'd2,
    ST_FF1  = 2'd3
  } rxstat_t;

  function automatic int unsigned dbits(input logic mode20);
    return mode20 ? 20 : 16;
  endfunction

  function automatic int unsigned fbits(input logic mode20);
    return mode20 ? 24 : 20;
  endfunction

  // True-form C-field of a data frame, C0 in bit 0.
  function automatic logic [3:0] cfield_data(input logic flag);
    return flag ? 4'b1101 : 4'b1011;   // {C3,C2,C1,C0}
  endfunction

  localparam logic [3:0] CFIELD_CTRL = 4'b1100;  // {C3,C2,C1,C0} = C 0,0,1,1

  // Place a 4-bit C-field behind the D-field of the given mode.
  function automatic frame_t place_cfield(input dfield_t d, input logic [3:0] c,
                                          input logic mode20);
    frame_t f;
    f = '0;
    for (int i = 0; i < int'(MAXD); i++)
      if (i < int'(dbits(mode20))) f[i] = d[i];
    for (int i = 0; i < 4; i++) f[int'(dbits(mode20)) + i] = c[i];
    return f;
  endfunction

  // Fill D-field: 'ones' ones starting at D0, zeros above.
  function automatic dfield_t fill_dfield(input int unsigned ones);
    dfield_t d;
    for (int i = 0; i < int'(MAXD); i++) d[i] = (i < int'(ones));
    return d;
  endfunction

  // Number of leading ones of FF0: with C2,C3 high the frame has N/2 ones.
  function automatic int unsigned ff0_ones(input logic mode20);
    return fbits(mode20) / 2 - 2;
  endfunction

  function automatic frame_t fill_frame(input ftype_t t, input logic mode20);
    int unsigned k;
    k = ff0_ones(mode20);
    if (t == FT_FF1H) k = k + 1;
    else if (t == FT_FF1L) k = k - 1;
    return place_cfield(fill_dfield(k), CFIELD_CTRL, mode20);
  endfunction

  // Control D-field: payload bits fill the D-field around the fixed 0,1 pair
  // at positions N/2-1 and N/2 (N = D-field width).
  function automatic dfield_t ctrl_dfield(input dfield_t payload, input logic mode20);
    dfield_t d;
    int unsigned h, j;
    h = dbits(mode20) / 2;
    d = '0;
    j = 0;
    for (int i = 0; i < int'(MAXD); i++) begin
      if (i < int'(dbits(mode20))) begin
        if (i == int'(h) - 1)      d[i] = 1'b0;
        else if (i == int'(h))     d[i] = 1'b1;
        else begin
          d[i] = payload[j];
          j++;
        end
      end
    end
    return d;
  endfunction

  // Inverse of ctrl_dfield (marker bits dropped).
  function automatic dfield_t ctrl_payload(input dfield_t d, input logic mode20);
    dfield_t p;
    int unsigned h, j;
    h = dbits(mode20) / 2;
    p = '0;
    j = 0;
    for (int i = 0; i < int'(MAXD); i++) begin
      if (i < int'(dbits(mode20)) && i != int'(h) - 1 && i != int'(h)) begin
        p[j] = d[i];
        j++;
      end
    end
    return p;
  endfunction

  // Mask of the bits that exist in a frame of the given mode.
  function automatic frame_t frame_mask(input logic mode20);
    return mode20 ? frame_t'({MAXN{1'b1}}) : frame_t'({(MAXN-4){1'b1}});
  endfunction

endpackage
