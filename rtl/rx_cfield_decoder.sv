`timescale 1ps/1fs
// rx_cfield_decoder: C-field decoder of the receiver.
//
// Classifies each received frame from its C-field (and, for the C = 0,0,1,1
// group, the D-field marks that tell control from fill), following the code
// table of cimt_pkg:
//   C1 == C2                  -> frame error (master transition missing)
//   C0 == C3                  -> data; inverted if C0 = 0; FLAG = C2 xnor C0
//   C = 0,0,1,1, marks 0,1    -> control, true form
//   C = 0,0,1,1, exact fill   -> FF0, FF1H or FF1L
//   C = 1,1,0,0, marks 1,0    -> control, inverted
//   anything else             -> frame error
// When the transmitter toggles FLAG (flagsel low) the decoder also checks
// that FLAG alternates between successive data frames and flags a frame
// error if it does not; the history is kept in a register updated on
// fvalid and cleared by a frame error.  Classification is combinational.
module rx_cfield_decoder
  import cimt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   fvalid,     // frame presented this cycle
  input  frame_t frame,
  input  logic   mode20,
  input  logic   flagsel,    // 0: FLAG toggles and is checked
  output ftype_t ftype,
  output logic   inv,        // frame arrived complemented
  output logic   flag
);
  logic [3:0] c;            // {C3,C2,C1,C0}
  logic       m_lo, m_hi;   // D-field marks at N/2-1 and N/2
  logic       have_last, last_flag;
  ftype_t     raw;
  int unsigned n;

  always_comb begin
    n      = dbits(mode20);
    c      = '0;
    for (int i = 0; i < 4; i++) c[i] = frame[n + i];
    m_lo   = frame[n/2 - 1];
    m_hi   = frame[n/2];
    inv    = 1'b0;
    flag   = 1'b0;
    raw    = FT_FE;
    if (c[1] != c[2]) begin
      if (c[0] == c[3]) begin
        raw  = FT_DATA;
        inv  = ~c[0];
        flag = c[2] ~^ c[0];
      end else if (c == CFIELD_CTRL) begin
        if (!m_lo && m_hi)                                   raw = FT_CTRL;
        else if (frame == fill_frame(FT_FF0, mode20))         raw = FT_FF0;
        else if (frame == fill_frame(FT_FF1H, mode20))        raw = FT_FF1H;
        else if (frame == fill_frame(FT_FF1L, mode20))        raw = FT_FF1L;
      end else if (c == ~CFIELD_CTRL && m_lo && !m_hi) begin
        raw = FT_CTRL;
        inv = 1'b1;
      end
    end
    ftype = raw;
    if (raw == FT_DATA && !flagsel && have_last && flag == last_flag)
      ftype = FT_FE;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      have_last <= 1'b0;
      last_flag <= 1'b0;
    end else if (fvalid) begin
      if (ftype == FT_FE) have_last <= 1'b0;
      else if (ftype == FT_DATA) begin
        have_last <= 1'b1;
        last_flag <= flag;
      end
    end
endmodule
