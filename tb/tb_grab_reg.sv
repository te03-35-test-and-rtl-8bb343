`timescale 1ns/1ps
// Testbench for grab_reg: random FRAMEs of four clocks with random REQUEST
// and BUSY_IN per bit; after each FRAME bit i must hold
// REQUEST_i & (~BUSY_i | previous bit i), and outside FRAMEs the register
// holds. grab_set / grab_reset (set wins) are checked too.
module tb_grab_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic frame = 0, request = 0, busy_in = 0, grab_set = 0, grab_reset = 0;
  logic [3:0] q, ref_q;

  grab_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    ref_q = 4'b0000;
    checks++; if (q !== ref_q) failures++;
    for (int f = 0; f < 150; f++) begin
      logic [3:0] rqv, bsv, nq;
      rqv = 4'($urandom); bsv = 4'($urandom);
      for (int i = 0; i < 4; i++) nq[i] = rqv[i] & (~bsv[i] | ref_q[i]);
      frame = 1;
      for (int k = 3; k >= 0; k--) begin
        request = rqv[k]; busy_in = bsv[k];
        @(negedge clk);
      end
      frame = 0; request = 1'($urandom); busy_in = 1'($urandom);
      ref_q = nq;
      checks++; if (q !== ref_q) begin failures++; if (failures < 5) $display("f=%0d q=%b ref=%b", f, q, ref_q); end
      repeat (2) @(negedge clk);
      checks++; if (q !== ref_q) failures++;   // holds between FRAMEs
      if (f % 25 == 24) begin
        {grab_set, grab_reset} = 2'($urandom);
        @(negedge clk);
        if (grab_set) ref_q = 4'b1111; else if (grab_reset) ref_q = 4'b0000;
        {grab_set, grab_reset} = 2'b00;
        checks++; if (q !== ref_q) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
