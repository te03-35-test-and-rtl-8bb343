`timescale 1ns/1ps
// Decoder for the AC-coupling code of the FRAME and BUSY BIT channels.
//
// On the line an internal 1 is sent as the chip pair "10" and a 0 as "01", so
// the line toggles at the data rate except at a change of value. The received
// pair arrives as a 2-bit symbol per clock (sym[0] the earlier chip, sym[1]
// the later one, as delivered by rx_demux). The decoder keeps the earlier
// chip and XORs it with the inversion control phase_sel, registered, so the
// decoded bit is valid one clock after its symbol. If the receive clock has
// caught the pairs half a symbol off, the earlier chip is the complement of
// the data, and phase_sel = 1 restores the polarity. The code and the
// inversion control are the document's; taking a single chip is this design's
// simplest decoder for them.
module busy_decode (
  input  logic       clk,       // receive (mock optical) clock
  input  logic       rst_n,     // asynchronous reset, active low
  input  logic [1:0] sym,       // {later chip, earlier chip}
  input  logic       phase_sel, // inversion control
  output logic       dec        // decoded internal bit
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dec <= 1'b0;
    else        dec <= sym[0] ^ phase_sel;
endmodule
