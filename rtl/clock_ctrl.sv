`timescale 1ns/1ps
// Clock selection of the TE03_35 switch IC.
//
// Each received clock (electrical and mock-optical) reaches this block twice:
// straight from its receiver and after an analog delay chain, which lies
// outside this RTL. sel_elec / sel_opt bypass the delay chain (1 = bypass).
// A 0/180 degree phase select (phi_a for the electrical interface, phi1_a for
// the optical interface) inverts the clock that drives each input interface.
// int_sel1 chooses the clock of chain #1 (optical output side, switch core and
// BUSY BIT unit) and int_sel2 that of chain #2 (electrical output side):
// 0 takes the electrical clock, 1 the optical clock.
//
// The document names these controls and their purpose; the polarity of the
// bypass selects and the assignment of the core to chain #1 are this design's
// choice. The block is combinational clock muxing, as on the chip; switching a
// select while the clocks run can produce a short pulse.
module clock_ctrl (
  input  logic eclk,       // electrical input clock, undelayed
  input  logic eclk_dly,   // electrical input clock after the delay chain
  input  logic oclk,       // mock optical input clock, undelayed
  input  logic oclk_dly,   // mock optical input clock after the delay chain
  input  logic sel_elec,   // 1: bypass the electrical delay chain
  input  logic sel_opt,    // 1: bypass the optical delay chain
  input  logic phi_a,      // 1: electrical interface clock shifted by 180 degrees
  input  logic phi1_a,     // 1: optical interface clock shifted by 180 degrees
  input  logic int_sel1,   // clock chain #1: 0 electrical, 1 optical
  input  logic int_sel2,   // clock chain #2: 0 electrical, 1 optical
  output logic el_if_clk,  // electrical receive interface clock
  output logic opt_if_clk, // optical receive interface clock
  output logic chain1_clk, // switch internal clock, optical output clock
  output logic chain2_clk  // electrical output clock
);
  logic e_sel, o_sel;

  assign e_sel      = sel_elec ? eclk : eclk_dly;
  assign o_sel      = sel_opt  ? oclk : oclk_dly;
  assign el_if_clk  = e_sel ^ phi_a;
  assign opt_if_clk = o_sel ^ phi1_a;
  assign chain1_clk = int_sel1 ? o_sel : e_sel;
  assign chain2_clk = int_sel2 ? o_sel : e_sel;
endmodule
