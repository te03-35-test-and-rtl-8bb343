`timescale 1ns/1ps
// Request register of the BUSY BIT unit.
//
// While FRAME is low it loads the request interface register every clock.
// While FRAME is high it shifts right, from bit 0 towards bit 3, with a 0
// entering bit 0. Bit 3 is REQUEST, so during a FRAME the node presents its
// requests for processors 3, 2, 1, 0 in turn, matching the BUSY BIT stream,
// which starts with the highest processor. The master also uses it to set the
// length of a new FRAME. The document loads this register on the falling
// clock edge; here it uses the rising edge like the rest of the unit, which
// keeps REQUEST aligned with the registered FRAME.
module request_reg
  import te03_pkg::*;
(
  input  logic              clk,     // switch internal clock
  input  logic              rst_n,   // asynchronous reset, active low
  input  logic              frame,   // internal FRAME
  input  logic [N_PROC-1:0] if_q,    // request interface register
  output logic [N_PROC-1:0] q,       // register contents
  output logic              request  // REQUEST = q[N_PROC-1]
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     q <= '0;
    else if (frame) q <= {q[N_PROC-2:0], 1'b0};
    else            q <= if_q;

  assign request = q[N_PROC-1];
endmodule
