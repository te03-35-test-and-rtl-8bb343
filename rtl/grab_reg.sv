`timescale 1ns/1ps
// Grab register of the BUSY BIT unit: which BUSY BITs this node holds.
//
// It holds while FRAME is low. While FRAME is high it shifts right (bit 0
// towards bit 3) and bit 0 takes
//   GRAB = REQUEST & (~BUSY_IN | GRAB<3>)
// so a requested bit is won when it arrives free, kept while it is still
// requested, and given up when the request is withdrawn. After a FRAME of
// N_PROC clocks bit i again belongs to processor i. grab_set and grab_reset
// set or clear all bits; grab_set wins when both are high, as the document
// states. They are sampled on the clock here (the document does not say how
// they are timed).
module grab_reg
  import te03_pkg::*;
(
  input  logic              clk,        // switch internal clock
  input  logic              rst_n,      // asynchronous reset, active low
  input  logic              frame,      // internal FRAME
  input  logic              request,    // REQUEST
  input  logic              busy_in,    // received BUSY BIT
  input  logic              grab_set,   // grab_set2: set all bits
  input  logic              grab_reset, // grab_reset2: clear all bits
  output logic [N_PROC-1:0] q           // Grab<3:0>
);
  logic grab_new;

  assign grab_new = request && (!busy_in || q[N_PROC-1]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          q <= '0;
    else if (grab_set)   q <= '1;
    else if (grab_reset) q <= '0;
    else if (frame)      q <= {q[N_PROC-2:0], grab_new};
endmodule
