`timescale 1ns/1ps
// BUSY BIT unit: network access arbitration for N_PROC processors.
//
// FRAME and BUSY BIT each arrive on their own channel in the AC-coupling code
// (1 -> "10", 0 -> "01"), as 2-bit symbols per clock. The path for both is
//   decode (receive clock) -> buffer -> FRAME extract / aligned BUSY
//   -> monitoring circuit -> encode,
// one register each, so a symbol leaves four clocks after it arrived: two
// for receiving and buffering the FRAME and two for decoding and encoding,
// the latency the document gives. The node's master input is the active-low
// pin MTm (ms_n); fc_in is pin TCp. frame_mon_n is the FRAME monitor output,
// the internal FRAME inverted and delayed by one buffer clock (the document
// allows up to three). Decoding runs on the mock optical receive clock and
// everything after it on the switch internal clock; the receive clock should
// be offset (the 0/180 degree select) so that the crossing has margin.
module busy_bit_unit
  import te03_pkg::*;
(
  input  logic              rx_clk,      // receive (mock optical) clock
  input  logic              clk,         // switch internal clock
  input  logic              rst_n,       // asynchronous reset, active low
  input  logic              gclk,        // grab interface clock (clkock_in2)
  input  logic [1:0]        frame_sym,   // received FRAME symbol
  input  logic [1:0]        busy_sym,    // received BUSY symbol
  input  logic              phase_sel,   // decoder inversion control
  input  logic              ms_n,        // MTm: 0 = master node
  input  logic              fc_in,       // TCp: FRAME create
  input  logic [1:0]        bit_sel,     // BIT<1:0>
  input  logic              req_set,     // REQSET2
  input  logic              req_reset,   // REQRESET2
  input  logic              grab_set,    // grab_set2
  input  logic              grab_reset,  // grab_reset2
  output logic [1:0]        frame_out_sym, // transmitted FRAME symbol
  output logic [1:0]        busy_out_sym,  // transmitted BUSY symbol
  output logic              frame_mon_n, // FRAME monitor (inverted)
  output logic [N_PROC-1:0] gstat,       // grab interface register
  output logic [N_PROC-1:0] grab_out,    // grab_out pins (= ~gstat)
  output logic              frame,       // internal FRAME (observation)
  output logic [1:0]        frame_mode   // FRAME logic state (observation)
);
  logic frame_dec, busy_dec;
  logic frame_buf, busy_buf, busy_al;
  logic request, busy_out, hif;
  logic [N_PROC-1:0] req_if_q, grab_q;

  busy_decode u_fdec (.clk(rx_clk), .rst_n, .sym(frame_sym), .phase_sel, .dec(frame_dec));
  busy_decode u_bdec (.clk(rx_clk), .rst_n, .sym(busy_sym),  .phase_sel, .dec(busy_dec));

  // Receive buffer; the BUSY BIT gets a second stage to stay aligned with
  // the registered FRAME.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      frame_buf   <= 1'b0;
      busy_buf    <= 1'b0;
      busy_al     <= 1'b0;
      frame_mon_n <= 1'b1;
    end else begin
      frame_buf   <= frame_dec;
      busy_buf    <= busy_dec;
      busy_al     <= busy_buf;
      frame_mon_n <= ~frame;
    end

  frame_logic u_frame (
    .clk, .rst_n, .ms(~ms_n), .fc_in, .frame_in(frame_buf), .request,
    .frame, .hif, .mode(frame_mode)
  );

  busy_monitor u_mon (
    .clk, .rst_n, .gclk, .bit_sel, .req_set, .req_reset, .grab_set,
    .grab_reset, .frame, .busy_in(busy_al), .request, .busy_out,
    .req_if_q, .grab_q, .gstat, .grab_out
  );

  busy_encode u_fenc (.clk, .rst_n, .b(frame),    .sym(frame_out_sym));
  busy_encode u_benc (.clk, .rst_n, .b(busy_out), .sym(busy_out_sym));
endmodule
