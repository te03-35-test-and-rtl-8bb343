`timescale 1ns/1ps
// TE03_35 switch IC: a 4-channel switch for a network of processors, with a
// BUSY BIT unit for network access arbitration.
//
// Data path. Two electrical ports (A, B) and two optical paths (A, B), each
// LANES = 4 lanes at the line rate, enter through rx_demux, which splits every
// lane into two bits per cycle of the half-speed clock. The switch core
// registers the four words, routes them under the seven control lines C0..C6
// and registers them again; tx_mux turns each word back into line-rate lanes.
// Data flow in one direction only, inputs to outputs. From a line-rate input
// bit to the same bit on an output takes about four half-speed clocks.
//
// Clocking. clock_ctrl derives the electrical and optical receive interface
// clocks (delay-chain bypass and 0/180 degree phase select) and the two
// internal clock chains: chain #1 clocks the switch core, the optical
// transmitters and the BUSY BIT unit; chain #2 clocks the electrical
// transmitters. The delay chains themselves are analog and outside this RTL:
// their outputs enter as eclk_dly and oclk_dly.
//
// BUSY BIT. The FRAME and BUSY BIT channels are received like a one-lane path
// on the optical interface clock, handled by busy_bit_unit and transmitted
// on chain #1.
//
// All ports are the logic-level signals behind the chip's LVDS and CMOS pads;
// the pads, terminations and analog bias controls are not modelled. rst_n is
// an addition of this design: the chip has no reset pin.
module te03_35_top
  import te03_pkg::*;
(
  // clocks and clock controls
  input  logic              eclk,      // electrical input clock (lvds_eclk)
  input  logic              eclk_dly,  // the same after the analog delay chain
  input  logic              oclk,      // mock optical input clock (lvds_oclk)
  input  logic              oclk_dly,  // the same after the analog delay chain
  input  logic              sel_elec,  // SEL_ELEC
  input  logic              sel_opt,   // SEL_OPT
  input  logic              phi_a,     // PHI_A
  input  logic              phi1_a,    // PHI1_A
  input  logic              int_sel1,  // INT_SEL1
  input  logic              int_sel2,  // INT_SEL2
  input  logic              rst_n,     // reset, active low
  output logic              el_clk_out,  // electrical output clock (chain #2)
  output logic              opt_clk_out, // optical output clock (chain #1)
  // data path
  input  logic [6:0]        c,         // switch control C6..C0 (bit i = Ci)
  input  logic [LANES-1:0]  el_ina,    // EL_INA<0:3>
  input  logic [LANES-1:0]  el_inb,    // EL_INB<0:3>
  input  logic [LANES-1:0]  opt_ina,   // OPT_INA<0:3>
  input  logic [LANES-1:0]  opt_inb,   // OPT_INB<0:3>
  output logic [LANES-1:0]  el_outa,   // EL_OUTA<0:3>
  output logic [LANES-1:0]  el_outb,   // EL_OUTB<0:3>
  output logic [LANES-1:0]  opt_outa,  // OPT_OUTA<0:3>
  output logic [LANES-1:0]  opt_outb,  // OPT_OUTB<0:3>
  // BUSY BIT
  input  logic              frame_in,   // LVDS_T: encoded FRAME in
  input  logic              busy_in,    // LVDS_BS: encoded BUSY BIT in
  input  logic              phase_sel,  // decoder inversion control
  input  logic              mt_n,       // MTm: 0 = master
  input  logic              tc,         // TC2p: FRAME create
  input  logic [1:0]        bit_sel,    // BIT1, BIT0
  input  logic              req_set,    // REQSET2
  input  logic              req_reset,  // REQRESET2
  input  logic              grab_set,   // grab_set2
  input  logic              grab_reset, // grab_reset2
  input  logic              grab_clk,   // clkock_in2
  output logic              frame_out,  // LVDSO_TO: encoded FRAME out
  output logic              busy_out,   // LVDSO_BS: encoded BUSY BIT out
  output logic              frame_mon_n,// LVDS_TO: internal FRAME, inverted
  output logic [N_PROC-1:0] grab_out,   // grab_out3..0 (low = grabbed)
  output logic [N_PROC-1:0] gstat,      // GSTAT<3:0>, grab interface register
  // observation of internal state
  output logic              int_frame,  // internal FRAME
  output logic [1:0]        frame_mode  // FRAME logic state
);
  localparam int unsigned W = 2 * LANES;

  logic el_if_clk, opt_if_clk, chain1_clk, chain2_clk;
  logic [W-1:0] w_el_a, w_el_b, w_opt_a, w_opt_b;
  logic [W-1:0] s_el_a, s_el_b, s_opt_a, s_opt_b;
  logic [1:0] frame_sym, busy_sym, frame_out_sym, busy_out_sym;

  clock_ctrl u_clk (
    .eclk, .eclk_dly, .oclk, .oclk_dly, .sel_elec, .sel_opt, .phi_a, .phi1_a,
    .int_sel1, .int_sel2, .el_if_clk, .opt_if_clk, .chain1_clk, .chain2_clk
  );
  assign el_clk_out  = chain2_clk;
  assign opt_clk_out = chain1_clk;

  // receive interfaces
  rx_demux #(.LANES(LANES)) u_rx_el_a  (.clk(el_if_clk),  .rst_n, .din(el_ina),  .dout(w_el_a));
  rx_demux #(.LANES(LANES)) u_rx_el_b  (.clk(el_if_clk),  .rst_n, .din(el_inb),  .dout(w_el_b));
  rx_demux #(.LANES(LANES)) u_rx_opt_a (.clk(opt_if_clk), .rst_n, .din(opt_ina), .dout(w_opt_a));
  rx_demux #(.LANES(LANES)) u_rx_opt_b (.clk(opt_if_clk), .rst_n, .din(opt_inb), .dout(w_opt_b));

  switch_core #(.W(W)) u_core (
    .clk(chain1_clk), .rst_n, .c,
    .el_a_i(w_el_a), .el_b_i(w_el_b), .opt_a_i(w_opt_a), .opt_b_i(w_opt_b),
    .el_a_o(s_el_a), .el_b_o(s_el_b), .opt_a_o(s_opt_a), .opt_b_o(s_opt_b)
  );

  // transmit interfaces
  tx_mux #(.LANES(LANES)) u_tx_el_a  (.clk(chain2_clk), .rst_n, .din(s_el_a),  .dout(el_outa));
  tx_mux #(.LANES(LANES)) u_tx_el_b  (.clk(chain2_clk), .rst_n, .din(s_el_b),  .dout(el_outb));
  tx_mux #(.LANES(LANES)) u_tx_opt_a (.clk(chain1_clk), .rst_n, .din(s_opt_a), .dout(opt_outa));
  tx_mux #(.LANES(LANES)) u_tx_opt_b (.clk(chain1_clk), .rst_n, .din(s_opt_b), .dout(opt_outb));

  // BUSY BIT channels
  rx_demux #(.LANES(1)) u_rx_frame (.clk(opt_if_clk), .rst_n, .din(frame_in), .dout(frame_sym));
  rx_demux #(.LANES(1)) u_rx_busy  (.clk(opt_if_clk), .rst_n, .din(busy_in),  .dout(busy_sym));

  busy_bit_unit u_busy (
    .rx_clk(opt_if_clk), .clk(chain1_clk), .rst_n, .gclk(grab_clk),
    .frame_sym, .busy_sym, .phase_sel, .ms_n(mt_n), .fc_in(tc), .bit_sel,
    .req_set, .req_reset, .grab_set, .grab_reset, .frame_out_sym,
    .busy_out_sym, .frame_mon_n, .gstat, .grab_out, .frame(int_frame),
    .frame_mode
  );

  tx_mux #(.LANES(1)) u_tx_frame (.clk(chain1_clk), .rst_n, .din(frame_out_sym), .dout(frame_out));
  tx_mux #(.LANES(1)) u_tx_busy  (.clk(chain1_clk), .rst_n, .din(busy_out_sym),  .dout(busy_out));
endmodule
