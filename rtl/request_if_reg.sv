`timescale 1ns/1ps
// Request interface register: the external interface to the request register.
//
// Four bits B<0>..B<3>. BIT<1:0> selects one of them; a high REQ_SET sets the
// selected bit and a high REQ_RESET clears it; with both low the register
// holds. When both are high REQ_SET wins, as the document's discussion of
// testing states (its truth table calls that case not allowed). On the chip
// the bits are RS latches driven directly by the pins; here they are
// flip-flops sampled on the internal clock, so a set or reset pulse must last
// at least one clock and BIT<1:0> must be stable while it is high. The
// register clears on reset.
module request_if_reg
  import te03_pkg::*;
(
  input  logic              clk,       // switch internal clock
  input  logic              rst_n,     // asynchronous reset, active low
  input  logic [1:0]        bit_sel,   // BIT<1:0>
  input  logic              req_set,   // REQ_SET (REQSET2)
  input  logic              req_reset, // REQ_RESET (REQRESET2)
  output logic [N_PROC-1:0] q          // B<3:0>
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         q <= '0;
    else if (req_set)   q[bit_sel] <= 1'b1;
    else if (req_reset) q[bit_sel] <= 1'b0;
endmodule
