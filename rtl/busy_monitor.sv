`timescale 1ns/1ps
// BUSY BIT monitoring circuit: request interface register, request register,
// grab register, grab interface register and the BUSY_OUT logic.
//
// The BUSY BITs of the N_PROC processors travel serially, highest processor
// first, while FRAME is high. For each bit the node forwards
//   BUSY_OUT = REQUEST | BUSY_IN & ~GRAB<3>
// so a requested bit leaves busy, a bit this node held but no longer requests
// leaves free, and any other bit passes unchanged; the grab register records
// what was won. Outside the FRAME the BUSY line is passed through unchanged
// (the document's measurements show the idle level copied to the output; the
// gating by FRAME is this design's reading). BUSY_OUT is combinational from
// registered signals; the encoder downstream registers it.
module busy_monitor
  import te03_pkg::*;
(
  input  logic              clk,        // switch internal clock
  input  logic              rst_n,      // asynchronous reset, active low
  input  logic              gclk,       // grab interface clock (clkock_in2)
  input  logic [1:0]        bit_sel,    // BIT<1:0>
  input  logic              req_set,    // REQ_SET
  input  logic              req_reset,  // REQ_RESET
  input  logic              grab_set,   // set all grab bits
  input  logic              grab_reset, // clear all grab bits
  input  logic              frame,      // internal FRAME
  input  logic              busy_in,    // INT_BUSY_IN, aligned with frame
  output logic              request,    // REQUEST
  output logic              busy_out,   // INT_BUSY_OUT
  output logic [N_PROC-1:0] req_if_q,   // request interface register
  output logic [N_PROC-1:0] grab_q,     // grab register
  output logic [N_PROC-1:0] gstat,      // grab interface register
  output logic [N_PROC-1:0] grab_out    // grab_out pins (= ~gstat)
);
  logic [N_PROC-1:0] req_q;

  request_if_reg u_req_if (
    .clk, .rst_n, .bit_sel, .req_set, .req_reset, .q(req_if_q)
  );

  request_reg u_req (
    .clk, .rst_n, .frame, .if_q(req_if_q), .q(req_q), .request
  );

  grab_reg u_grab (
    .clk, .rst_n, .frame, .request, .busy_in, .grab_set, .grab_reset,
    .q(grab_q)
  );

  grab_if_reg u_grab_if (
    .gclk, .rst_n, .grab(grab_q), .gstat, .grab_out
  );

  assign busy_out = frame ? (request || (busy_in && !grab_q[N_PROC-1])) : busy_in;
endmodule
