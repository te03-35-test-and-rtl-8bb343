`timescale 1ns/1ps
// Testbench for request_reg: while FRAME is low the register follows the
// interface register one clock later; during a FRAME of four clocks REQUEST
// must present bits 3, 2, 1, 0 of the loaded value in turn, then zeros.
module tb_request_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic frame = 0;
  logic [3:0] if_q = 0, q;
  logic request;

  request_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      logic [3:0] v;
      v = 4'($urandom);
      @(negedge clk); if_q = v; frame = 0;
      @(negedge clk);
      checks++; if (q !== v) failures++;
      if_q = ~v;          // must be ignored during the FRAME
      frame = 1;
      for (int k = 3; k >= 0; k--) begin
        checks++;
        if (request !== v[k]) failures++;
        @(negedge clk);
      end
      frame = 0;
      checks++; if (q !== 4'b0000) failures++;
      @(negedge clk);
      checks++; if (q !== ~v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
