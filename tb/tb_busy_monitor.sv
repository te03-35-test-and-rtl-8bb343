`timescale 1ns/1ps
// Testbench for busy_monitor. It replays the request/grab/release sequences
// of the chip's measurements with FRAMEs of four clocks (BUSY BITs 3, 2, 1, 0
// in that order) and compares BUSY_OUT bit by bit with the documented output
// patterns, the grab register and the grab interface outputs with the
// documented results, and then runs random requests and BUSY inputs against
// an independent per-processor model.
module tb_busy_monitor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, gclk = 0;
  logic [1:0] bit_sel = 0;
  logic req_set = 0, req_reset = 0, grab_set = 0, grab_reset = 0;
  logic frame = 0, busy_in = 1;
  logic request, busy_out;
  logic [3:0] req_if_q, grab_q, gstat, grab_out;

  busy_monitor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic strobe(input logic [1:0] b, input logic set);
    @(negedge clk); bit_sel = b; req_set = set; req_reset = ~set;
    @(negedge clk); req_set = 0; req_reset = 0;
    repeat (2) @(negedge clk);
  endtask

  // one FRAME; bin[3] is sent first; returns BUSY_OUT in the same order
  task automatic run_frame(input logic [3:0] bin, output logic [3:0] bout);
    @(negedge clk);
    checks++; if (busy_out !== busy_in) failures++;   // idle: pass-through
    frame = 1;
    for (int k = 3; k >= 0; k--) begin
      busy_in = bin[k];
      #1 bout[k] = busy_out;
      @(negedge clk);
    end
    frame = 0; busy_in = 1;
    #1;
    checks++; if (busy_out !== 1'b1) failures++;
  endtask

  task automatic expect4(input string what, input logic [3:0] got, input logic [3:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %b want %b", what, got, want);
    end
  endtask

  task automatic gpulse();
    @(negedge clk); gclk = 1; @(negedge clk); gclk = 0;
  endtask

  initial begin
    logic [3:0] bo;
    logic [3:0] m_req, m_grab;
    #22 rst_n = 1;
    repeat (2) @(negedge clk);
    // no requests: BUSY passes through
    run_frame(4'b0000, bo); expect4("no request", bo, 4'b0000);
    // request #3
    strobe(2'd3, 1);
    run_frame(4'b0000, bo); expect4("request 3", bo, 4'b1000);
    expect4("grab after request 3", grab_q, 4'b1000);
    // request #1 as well
    strobe(2'd1, 1);
    run_frame(4'b1000, bo); expect4("request 3,1", bo, 4'b1010);
    expect4("grab after request 3,1", grab_q, 4'b1010);
    // drop #1, request #2
    strobe(2'd1, 0); strobe(2'd2, 1);
    run_frame(4'b1000, bo); expect4("request 3,2", bo, 4'b1100);
    expect4("grab after request 3,2", grab_q, 4'b1100);
    gpulse();
    expect4("gstat", gstat, 4'b1100); expect4("grab_out", grab_out, 4'b0011);
    // clear everything
    strobe(2'd2, 0); strobe(2'd3, 0);
    run_frame(4'b1100, bo); expect4("release 3,2", bo, 4'b0000);
    expect4("grab after release", grab_q, 4'b0000);
    // bit #1 continuously requested, FRAMEs with BUSY IN 0000 then 1000
    strobe(2'd1, 1);
    run_frame(4'b0000, bo); expect4("request 1, frame 1", bo, 4'b0010);
    run_frame(4'b1000, bo); expect4("request 1, frame 2", bo, 4'b1010);
    strobe(2'd1, 0);
    run_frame(4'b0010, bo); expect4("release 1", bo, 4'b0000);
    // request/grab and release of #3 with the grab interface
    strobe(2'd3, 1);
    run_frame(4'b0000, bo); expect4("grab 3", bo, 4'b1000);
    gpulse(); checks++; if (grab_out[3] !== 1'b0) failures++;
    strobe(2'd3, 0);
    run_frame(4'b1000, bo); expect4("release 3", bo, 4'b0000);
    gpulse(); checks++; if (grab_out[3] !== 1'b1) failures++;
    // the Figure-5 example: requests 3 and 1, P3 already busy elsewhere
    strobe(2'd3, 1); strobe(2'd1, 1);
    run_frame(4'b1000, bo); expect4("fig5 busy out", bo, 4'b1010);
    expect4("fig5 grab", grab_q, 4'b0010);
    gpulse(); expect4("fig5 gstat", gstat, 4'b0010);
    // global grab set / reset
    @(negedge clk); grab_set = 1; grab_reset = 1; @(negedge clk); grab_set = 0; grab_reset = 0;
    expect4("grab_set wins", grab_q, 4'b1111);
    @(negedge clk); grab_reset = 1; @(negedge clk); grab_reset = 0;
    expect4("grab_reset", grab_q, 4'b0000);
    // random traffic against a per-processor model
    m_req = req_if_q; m_grab = grab_q;
    for (int f = 0; f < 200; f++) begin
      logic [3:0] bin, want, ng;
      if ($urandom % 2) begin
        logic [1:0] b; logic s;
        b = 2'($urandom); s = 1'($urandom);
        strobe(b, s); m_req[b] = s;
      end
      bin = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        want[i] = m_req[i] | (bin[i] & ~m_grab[i]);
        ng[i]   = m_req[i] & (~bin[i] | m_grab[i]);
      end
      run_frame(bin, bo);
      m_grab = ng;
      expect4("random busy out", bo, want);
      expect4("random grab", grab_q, m_grab);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
