`timescale 1ns/1ps
// FRAME extract logic of the BUSY BIT unit: pass-through, initialization and
// creation of the FRAME.
//
// The logic follows the document's equations, evaluated once per clock:
//   FRAME <= ~MS & FRAME_IN | MS & ~FC_IN & (HIF & REQUEST | ~HIF & FRAME_IN)
//   HIF   <= MS & (FC_IN | HIF & REQUEST)
// MS marks the master node (pin MTm, active low, inverted outside) and FC_IN
// asks the master to create a FRAME. While MS and FC_IN are high the FRAME is
// held low and HIF (hide incoming frame) is set: initialization. When FC_IN
// falls, FRAME follows REQUEST, the output of the request register, which
// shifts while FRAME is high; HIF drops with REQUEST and the node returns to
// pass-through, where FRAME repeats FRAME_IN one clock later. Because FRAME
// is a register and the request register shifts only once FRAME is high, a
// request register holding m ones from the right produces a FRAME of m+1
// clocks, as the document states. FC_IN is taken as synchronous to clk.
// `mode` reports which of the three states the node is in.
module frame_logic (
  input  logic clk,      // switch internal clock
  input  logic rst_n,    // asynchronous reset, active low
  input  logic ms,       // 1: this node is the master
  input  logic fc_in,    // FRAME create input
  input  logic frame_in, // received, decoded and buffered FRAME
  input  logic request,  // REQUEST, bit 3 of the request register
  output logic frame,    // internal FRAME (also FRAME_OUT before encoding)
  output logic hif,      // hide incoming frame
  output logic [1:0] mode // 0 pass-through, 1 initialization, 2 creation
);
  localparam logic [1:0] M_PASS = 2'd0, M_INIT = 2'd1, M_CREATE = 2'd2;

  logic frame_d, hif_d;

  always_comb begin
    frame_d = (!ms && frame_in) ||
              (ms && !fc_in && ((hif && request) || (!hif && frame_in)));
    hif_d   = ms && (fc_in || (hif && request));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      frame <= 1'b0;
      hif   <= 1'b0;
    end else begin
      frame <= frame_d;
      hif   <= hif_d;
    end

  always_comb begin
    if (ms && fc_in)   mode = M_INIT;
    else if (ms && hif) mode = M_CREATE;
    else               mode = M_PASS;
  end
endmodule
