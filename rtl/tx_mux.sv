`timescale 1ns/1ps
// Transmit multiplexer: half rate to line rate.
//
// A 2*LANES-bit word is registered on the rising edge of the half-speed
// clock. While the clock is high the lower half (the earlier bits) drives the
// outputs, while it is low the upper half does, so each word leaves as two
// line-rate bits per lane: the earlier bit in the high phase right after the
// rising edge that registered the word, the later bit in the low phase.
// The document says the data are multiplexed by 2 again at the output with a
// half-speed clock; the clock-steered output select is this design's
// rendering of that, with the same word layout as rx_demux.
module tx_mux #(
  parameter int unsigned LANES = 4
) (
  input  logic               clk,   // half-speed transmit clock
  input  logic               rst_n, // asynchronous reset, active low
  input  logic [2*LANES-1:0] din,   // {later bits, earlier bits}
  output logic [LANES-1:0]   dout   // line-rate outputs
);
  logic [2*LANES-1:0] word_q;
  logic [LANES-1:0]   late_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) word_q <= '0;
    else        word_q <= din;

  // The later half is retimed to the falling edge so that it is stable for
  // the whole low phase.
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) late_q <= '0;
    else        late_q <= word_q[2*LANES-1:LANES];

  assign dout = clk ? word_q[LANES-1:0] : late_q;
endmodule
