`timescale 1ns/1ps
// Testbench for grab_if_reg: the interface register changes only on a rising
// edge of the grab interface clock, then holds the grab register value, and
// grab_out is its complement.
module tb_grab_if_reg;
  int checks = 0, failures = 0;
  logic gclk = 0, rst_n = 1;
  logic [3:0] grab = 0, gstat, grab_out;

  grab_if_reg dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] held;
    #1 rst_n = 0;
    #4 rst_n = 1;
    #5;
    checks++; if (gstat !== 4'b0000 || grab_out !== 4'b1111) failures++;
    held = 4'b0000;
    for (int i = 0; i < 100; i++) begin
      grab = 4'($urandom);
      #3;
      checks++; if (gstat !== held) failures++;   // no edge yet
      gclk = 1; #1 held = grab;
      checks++; if (gstat !== held || grab_out !== ~held) begin failures++; $display("i=%0d gstat=%b held=%b out=%b", i, gstat, held, grab_out); end
      #2 grab = 4'($urandom);
      #2 gclk = 0; #2;
      checks++; if (gstat !== held) failures++;   // falling edge does nothing
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
