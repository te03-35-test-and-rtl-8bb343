`timescale 1ns/1ps
// Grab interface register: the external view of the grab register.
//
// A rising edge of the grab interface clock (pin clkock_in2, whose low phase
// is the active-low grab_enable) copies the grab register into GSTAT<3:0>.
// It should be clocked while no FRAME is passing, best right after one. The
// grab_out pins are the complement of GSTAT: a grabbed bit reads low, as the
// document's measurements show. The register clears on reset.
module grab_if_reg
  import te03_pkg::*;
(
  input  logic              gclk,     // grab interface clock (clkock_in2)
  input  logic              rst_n,    // asynchronous reset, active low
  input  logic [N_PROC-1:0] grab,     // grab register
  output logic [N_PROC-1:0] gstat,    // GSTAT<3:0>
  output logic [N_PROC-1:0] grab_out  // grab_out3..0, = ~GSTAT
);
  always_ff @(posedge gclk or negedge rst_n)
    if (!rst_n) gstat <= '0;
    else        gstat <= grab;

  assign grab_out = ~gstat;
endmodule
