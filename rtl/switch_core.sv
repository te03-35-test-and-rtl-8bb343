`timescale 1ns/1ps
// Switch core: restricted 4x4 crossbar between the four channels.
//
// Inputs are the half-rate words of electrical ports A and B and optical paths
// A and B; outputs are the same four channels. Every input word is captured in
// a boundary register (the chip's sense-amp flip-flops), routed through the
// crossbar, and captured again in an output boundary register, so a word
// appears at the outputs two clocks after it was presented. One input may feed
// several outputs (broadcast), as two of the documented configurations do.
//
// The seven static control lines c[0]..c[6] (C0..C6) are decoded by
// te03_pkg::decode_ctrl. The document gives the six control combinations of
// its Figure 3 and states that four connections cannot be made (an optical
// input never reaches the other path's optical or electrical output); the
// decode reproduces exactly those six and respects the four exclusions. How
// the remaining combinations map is this design's own completion, and C0 and
// C6 are treated as redundant lines without effect. The chip switches with
// low-swing differential pass-transistor logic; here it is a word multiplexer.
module switch_core
  import te03_pkg::*;
#(
  parameter int unsigned W = 2 * LANES  // word width of one channel
) (
  input  logic         clk,     // switch internal clock
  input  logic         rst_n,   // asynchronous reset, active low
  input  logic [6:0]   c,       // switch control C0..C6 (bit i = Ci)
  input  logic [W-1:0] el_a_i,
  input  logic [W-1:0] el_b_i,
  input  logic [W-1:0] opt_a_i,
  input  logic [W-1:0] opt_b_i,
  output logic [W-1:0] el_a_o,
  output logic [W-1:0] el_b_o,
  output logic [W-1:0] opt_a_o,
  output logic [W-1:0] opt_b_o
);
  logic [W-1:0] in_q [4];
  sw_map_t      map;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) in_q[i] <= '0;
    end else begin
      in_q[SRC_EL_A]  <= el_a_i;
      in_q[SRC_EL_B]  <= el_b_i;
      in_q[SRC_OPT_A] <= opt_a_i;
      in_q[SRC_OPT_B] <= opt_b_i;
    end

  assign map = decode_ctrl(c);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      el_a_o  <= '0;
      el_b_o  <= '0;
      opt_a_o <= '0;
      opt_b_o <= '0;
    end else begin
      el_a_o  <= in_q[map.el_a];
      el_b_o  <= in_q[map.el_b];
      opt_a_o <= in_q[map.opt_a];
      opt_b_o <= in_q[map.opt_b];
    end

  // The decode must never make one of the connections the document excludes.
  a_no_forbidden: assert property (@(posedge clk) disable iff (!rst_n)
      map.opt_a != SRC_OPT_B && map.opt_b != SRC_OPT_A &&
      map.el_a  != SRC_OPT_B && map.el_b  != SRC_OPT_A);
endmodule
