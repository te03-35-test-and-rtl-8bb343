`timescale 1ns/1ps
// Testbench for frame_logic.
// - Pass-through: a non-master node (and a master with FC_IN low) repeats a
//   random FRAME_IN one clock later.
// - Initialization: a master with FC_IN high holds FRAME low whatever
//   FRAME_IN does, and HIF is high.
// - Creation: after FC_IN falls, a request register holding m ones from the
//   right (modelled here, shifting while FRAME is high) must give a FRAME of
//   exactly m+1 clocks, after which the node is back in pass-through.
module tb_frame_logic;
  int checks = 0, failures = 0;
  int n_pass = 0, n_init = 0, n_create = 0;
  logic clk = 0, rst_n = 0;
  logic ms = 0, fc_in = 0, frame_in = 0, request;
  logic frame, hif;
  logic [1:0] mode;
  logic [3:0] rq, rq_load = 4'b0000;

  frame_logic dut (.*);

  always #5 clk = ~clk;

  // request register model: load while FRAME low, shift towards bit 3 while high
  always_ff @(posedge clk) rq <= frame ? {rq[2:0], 1'b0} : rq_load;
  assign request = rq[3];

  always @(posedge clk) if (rst_n) begin
    if (mode == 2'd0) n_pass++;
    if (mode == 2'd1) n_init++;
    if (mode == 2'd2) n_create++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    rq = '0;
    #12 rst_n = 1;
    // pass-through, non-master (FC_IN random) and master with FC_IN low
    for (int i = 0; i < 80; i++) begin
      @(negedge clk);
      ms = (i >= 40); fc_in = (i < 40) ? 1'($urandom) : 1'b0;
      prev = frame_in;
      frame_in = 1'($urandom);
      @(posedge clk); #1;
      checks++;
      if (frame !== frame_in) failures++;
    end
    // initialization
    @(negedge clk); ms = 1; fc_in = 1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); frame_in = 1'($urandom);
      checks++;
      if (frame !== 1'b0 || hif !== 1'b1 || mode !== 2'd1) failures++;
    end
    // creation with m = 1..4 ones set from bit 3 downwards
    for (int m = 1; m <= 4; m++) begin
      int len;
      @(negedge clk); ms = 1; fc_in = 1; frame_in = 0;
      rq_load = 4'b1111 << (4 - m);
      repeat (5) @(negedge clk);
      fc_in = 0;
      len = 0;
      // wait for the FRAME, then measure it
      for (int t = 0; t < 3 && !frame; t++) @(negedge clk);
      while (frame && len < 20) begin len++; @(negedge clk); end
      checks++;
      if (len != m + 1) begin failures++; $display("m=%0d: FRAME length %0d", m, len); end
      repeat (2) @(negedge clk);
      checks++;
      if (hif !== 1'b0 || mode !== 2'd0) failures++;
      // back in pass-through: FRAME_IN is repeated
      frame_in = 1;
      @(negedge clk);
      checks++;
      if (frame !== 1'b1) failures++;
      frame_in = 0;
      @(negedge clk);
    end
    checks++;
    if (n_pass == 0 || n_init == 0 || n_create == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
