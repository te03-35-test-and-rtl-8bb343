`timescale 1ns/1ps
// Shared types and constants of the TE03_35 switch IC.
//
// The switch connects four 4-bit channels: two electrical ports (A, B) and two
// optical paths (A, B). Each channel is 4 lanes wide at the line rate and is
// demultiplexed by 2, so inside the chip a channel is an 8-bit word per cycle
// of the half-speed clock. The BUSY BIT unit monitors N_PROC = 4 processors.
// The source encoding of the crossbar (sw_src_e) and the decode of the seven
// switch control lines (decode_ctrl) are this design's own; the document gives
// only six control combinations and four forbidden connections (see
// switch_core.sv).
package te03_pkg;

  localparam int unsigned LANES  = 4;  // data lanes per port / path
  localparam int unsigned N_PROC = 4;  // processors monitored by the BUSY BIT unit

  // Crossbar input channels.
  typedef enum logic [1:0] {
    SRC_EL_A  = 2'd0,
    SRC_EL_B  = 2'd1,
    SRC_OPT_A = 2'd2,
    SRC_OPT_B = 2'd3
  } sw_src_e;

  // Source chosen for each crossbar output.
  typedef struct packed {
    sw_src_e el_a;
    sw_src_e el_b;
    sw_src_e opt_a;
    sw_src_e opt_b;
  } sw_map_t;

  // Decode of the control lines c[0]..c[6] (C0..C6) into a connection map.
  // It reproduces the six configurations the document prints and never makes
  // a forbidden connection (OPT_IN_B->OPT_OUT_A, OPT_IN_A->OPT_OUT_B,
  // OPT_IN_B->EL_OUT_A, OPT_IN_A->EL_OUT_B). C0 and C6 take no part.
  function automatic sw_map_t decode_ctrl(input logic [6:0] c);
    sw_map_t m;
    m.el_a  = c[5] ? SRC_EL_B : SRC_OPT_A;
    m.el_b  = c[1] ? SRC_EL_A : SRC_OPT_B;
    m.opt_a = c[2] ? SRC_OPT_A : (c[4] ? SRC_EL_A : SRC_EL_B);
    if (!c[3])                          m.opt_b = SRC_EL_B;
    else if (c[1] || (c[4] && !c[2]))   m.opt_b = SRC_OPT_B;
    else                                m.opt_b = SRC_EL_A;
    return m;
  endfunction

endpackage
