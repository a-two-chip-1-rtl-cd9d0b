`timescale 1ps/1fs
// rx_smc: link start-up state machine controller.
//
// Both ends of a full-duplex link run this controller.  Each state fixes
// three things: the loop mode of the local receiver (frequency detect or
// phase detect), the fill frame the local transmitter sends (FF0 or FF1)
// and RFD, which tells the user whether data may be sent.  Moves are made
// on each status the local receiver reports (frame error, data, FF0, FF1):
//
//   state     loop   fill  RFD   FE     DATA   FF0    FF1
//   S_ACQ     FDET   FF0   0     S_ACQ  S_ACQ  S_LCK  S_LCK
//   S_LCK     FDET   FF1   0     S_ACQ  S_PHS  S_LCK  S_PHS
//   S_PHS     PHASE  FF1   0     S_ACQ  S_RDY  S_ACQ  S_RDY
//   S_RDY     PHASE  FF1   1     S_ACQ  S_RDY  S_ACQ  S_RDY
//
// Reset enters S_ACQ.  A frame error anywhere sends the node back to S_ACQ,
// where its FF0 tells the far end to restart too; receiving FF0 after the
// loop is in phase mode does the same.  The state names and the exact arcs
// are this design's reading of the start-up handshake.
module rx_smc
  import cimt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    svalid,      // a status arrives
  input  rxstat_t status,
  output logic    fdet,        // frequency detect mode
  output logic    send_ff0,    // fill frame to send: FF0 (else FF1)
  output logic    rfd,         // ready for data
  output logic [1:0] state
);
  typedef enum logic [1:0] {S_ACQ, S_LCK, S_PHS, S_RDY} smc_t;
  smc_t st, nx;

  always_comb begin
    nx = st;
    if (svalid)
      unique case (st)
        S_ACQ: if (status == ST_FF0 || status == ST_FF1) nx = S_LCK;
        S_LCK: if (status == ST_FE) nx = S_ACQ;
               else if (status == ST_FF1 || status == ST_DATA) nx = S_PHS;
        S_PHS: if (status == ST_FE || status == ST_FF0) nx = S_ACQ;
               else nx = S_RDY;
        S_RDY: if (status == ST_FE || status == ST_FF0) nx = S_ACQ;
        default: nx = S_ACQ;
      endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) st <= S_ACQ;
    else        st <= nx;

  assign fdet     = (st == S_ACQ) || (st == S_LCK);
  assign send_ff0 = (st == S_ACQ);
  assign rfd      = (st == S_RDY);
  assign state    = st;
endmodule
