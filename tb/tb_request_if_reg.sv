`timescale 1ns/1ps
// Testbench for request_if_reg: every row of the request interface truth
// table (set, reset or hold of the bit chosen by BIT<1:0>) is applied from
// random starting contents and compared with a reference, including the
// case of both strobes high, where set wins.
module tb_request_if_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] bit_sel = 0;
  logic req_set = 0, req_reset = 0;
  logic [3:0] q, ref_q;

  request_if_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    checks++; if (q !== 4'b0000) failures++;
    ref_q = 4'b0000;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      bit_sel = 2'($urandom); {req_set, req_reset} = 2'($urandom);
      if (req_set) ref_q[bit_sel] = 1'b1;
      else if (req_reset) ref_q[bit_sel] = 1'b0;
      @(negedge clk);
      {req_set, req_reset} = 2'b00;
      checks++;
      if (q !== ref_q) begin failures++; if (failures < 5) $display("i=%0d q=%b ref=%b", i, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
