`timescale 1ns/1ps
// Testbench for rx_demux: drives random line-rate bits, one per half period
// of a 10 ns clock, and checks that each rising/falling sample pair appears
// as one word exactly one clock after the falling-edge bit was taken.
module tb_rx_demux;
  localparam int L = 4;
  localparam int N = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [L-1:0] din = '0;
  logic [2*L-1:0] dout;
  logic [L-1:0] sr [N], sf [N];

  rx_demux dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) begin sr[j] = L'($urandom); sf[j] = L'($urandom); end
    #12 rst_n = 1;
    // rising edges at 15, 25, ...; bit j is set up 2 ns before its edge
    for (int j = 0; j < N; j++) begin
      @(negedge clk); #3 din = sr[j];
      @(posedge clk); #1;
      if (j > 0) begin
        checks++;
        if (dout !== {sf[j-1], sr[j-1]}) begin
          failures++;
          if (failures < 5) $display("word %0d: got %h want %h", j-1, dout, {sf[j-1], sr[j-1]});
        end
      end
      #2 din = sf[j];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
