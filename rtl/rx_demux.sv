`timescale 1ns/1ps
// Receive demultiplexer: line rate to half rate.
//
// The LANES inputs carry one bit per half clock period (double data rate).
// Each lane is sampled on the rising and on the falling edge of the
// half-speed interface clock; on the next rising edge the pair is presented
// as one 2*LANES-bit word. Lane i of the word holds the rising-edge sample in
// bit i and the following falling-edge sample in bit LANES+i, so dout[i] is
// the earlier bit. A bit sampled on a rising edge reaches dout one clock
// later. The document says the inputs are demultiplexed by 2 with a
// half-speed clock; the word layout is this design's own.
module rx_demux #(
  parameter int unsigned LANES = 4
) (
  input  logic               clk,   // half-speed interface clock
  input  logic               rst_n, // asynchronous reset, active low
  input  logic [LANES-1:0]   din,   // line-rate inputs
  output logic [2*LANES-1:0] dout   // {later bits, earlier bits}
);
  logic [LANES-1:0] rise_q, fall_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rise_q <= '0;
    else        rise_q <= din;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) fall_q <= '0;
    else        fall_q <= din;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dout <= '0;
    else        dout <= {fall_q, rise_q};
endmodule
