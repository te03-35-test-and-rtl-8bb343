`timescale 1ns/1ps
// Testbench for busy_decode: encoded pairs "10" and "01" must decode to 1
// and 0 one clock later, inverted when phase_sel is high; it also replays the
// 32-chip pattern of the decode measurement and checks both documented
// decodings (taking the pairs in one phase and the other).
module tb_busy_decode;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] sym = 2'b00;
  logic phase_sel = 0;
  logic dec;

  busy_decode dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the measured pattern, first chip on the left
  localparam string PAT  = "01111010101101010010101010101101";
  localparam string POS1 = "0001110000001111";  // documented decoding #1
  localparam string POS2 = "0011111000111111";  // documented decoding #2

  task automatic send(input logic [1:0] s, input logic ps, input logic exp);
    @(negedge clk); sym = s; phase_sel = ps;
    @(negedge clk);
    checks++;
    if (dec !== exp) failures++;
  endtask

  initial begin
    string got;
    #12 rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      logic b, ps;
      b = 1'($urandom); ps = 1'($urandom);
      send({~b, b}, ps, b ^ ps);
    end
    // Pattern decoded with the pairs taken from chip 0 (phase A) and from
    // chip 1 (phase B); the pattern repeats, so indices wrap. Each documented
    // decoding must equal a rotation of one of them.
    for (int ph = 0; ph < 2; ph++) begin
      logic [15:0] d;
      bit found;
      found = 0;
      for (int k = 0; k < 16; k++) begin
        logic c0, c1;
        c0 = (PAT[(2*k+ph) % 32] == "1");
        c1 = (PAT[(2*k+ph+1) % 32] == "1");
        @(negedge clk); sym = {c1, c0}; phase_sel = 0;
        @(negedge clk);
        d[15-k] = dec;
      end
      for (int r = 0; r < 16; r++) begin
        string want;
        logic [15:0] rot;
        want = (ph == 0) ? POS2 : POS1;
        rot = (d << r) | (d >> (16 - r));
        begin
          bit ok;
          ok = 1;
          for (int i = 0; i < 16; i++) if (rot[15-i] != (want[i] == "1")) ok = 0;
          if (ok) found = 1;
        end
      end
      checks++;
      if (!found) begin failures++; $display("phase %0d decoding %b matches no documented one", ph, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
