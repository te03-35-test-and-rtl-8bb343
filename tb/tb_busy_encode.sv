`timescale 1ns/1ps
// Testbench for busy_encode: each internal bit must appear one clock later
// as the pair "10" (for 1) or "01" (for 0), earlier chip in sym[0]; the
// 14-bit example of the coding scheme is replayed.
module tb_busy_encode;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic b = 0;
  logic [1:0] sym;

  busy_encode dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string EX  = "00000011110000";
  localparam string ENC = "0101010101011010101001010101";

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 14; i++) begin
      @(negedge clk); b = (EX[i] == "1");
      @(negedge clk);
      checks++;
      if (sym[0] !== (ENC[2*i] == "1") || sym[1] !== (ENC[2*i+1] == "1")) failures++;
    end
    for (int i = 0; i < 40; i++) begin
      logic v;
      v = 1'($urandom);
      @(negedge clk); b = v;
      @(posedge clk); #1;
      checks++;
      if (sym !== (v ? 2'b01 : 2'b10)) failures++;  // {later, earlier}
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
