`timescale 1ns/1ps
// Testbench for tx_mux: presents a random word every clock and checks that
// the lower half drives the lanes during the high phase after the word was
// registered and the upper half during the following low phase.
module tb_tx_mux;
  localparam int L = 4;
  localparam int N = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2*L-1:0] din = '0;
  logic [L-1:0] dout;
  logic [2*L-1:0] w [N];

  tx_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) w[j] = (2*L)'($urandom);
    #12 rst_n = 1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk); #2 din = w[j];
      @(posedge clk); #2;
      checks++;
      if (dout !== w[j][L-1:0]) failures++;
      @(negedge clk); #2;
      checks++;
      if (dout !== w[j][2*L-1:L]) failures++;
      #1 din = (2*L)'($urandom);  // must not leak into the low phase
      #1;
      checks++;
      if (dout !== w[j][2*L-1:L]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
