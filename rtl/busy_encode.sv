`timescale 1ns/1ps
// Encoder for the AC-coupling code of the FRAME and BUSY BIT channels.
//
// An internal 1 becomes the chip pair "10" and a 0 becomes "01". The output
// symbol is registered (one clock of latency) and laid out as
// {later chip, earlier chip} for tx_mux, so sym = {~b, b}. The code is the
// document's; the register stands for its "encode + buffer" stage.
module busy_encode (
  input  logic       clk,   // switch internal clock
  input  logic       rst_n, // asynchronous reset, active low
  input  logic       b,     // internal bit
  output logic [1:0] sym    // {later chip, earlier chip}
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sym <= 2'b10;  // encoded 0
    else        sym <= {~b, b};
endmodule
