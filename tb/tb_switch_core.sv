`timescale 1ns/1ps
// Testbench for switch_core.
// 1. The six control combinations printed with the design are applied with
//    distinct random words on the four inputs, and every output is compared
//    with the source the configuration names (hand-written table below).
// 2. All 128 combinations of C0..C6 are applied; for each, no output may
//    carry a word from a forbidden source (an optical input reaching the
//    other path's optical or electrical output).
// 3. The latency from input to output is checked to be two clocks.
module tb_switch_core;
  import te03_pkg::*;
  localparam int W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [6:0] c;
  logic [W-1:0] el_a_i, el_b_i, opt_a_i, opt_b_i;
  logic [W-1:0] el_a_o, el_b_o, opt_a_o, opt_b_o;

  switch_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources: 0 EL_A, 1 EL_B, 2 OPT_A, 3 OPT_B; order el_a, el_b, opt_a, opt_b
  typedef struct { logic [6:0] c; int src [4]; } cfg_t;
  cfg_t cfgs [6];

  function automatic logic [6:0] cbits(input string s);  // "C0..C6"
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[i] = (s[i] == "1");
    return r;
  endfunction

  logic [W-1:0] src_w [4];
  logic [W-1:0] out_w [4];
  assign out_w[0] = el_a_o;
  assign out_w[1] = el_b_o;
  assign out_w[2] = opt_a_o;
  assign out_w[3] = opt_b_o;

  task automatic apply(input logic [6:0] cv);
    // four distinct words
    src_w[0] = W'($urandom); 
    do src_w[1] = W'($urandom); while (src_w[1] == src_w[0]);
    do src_w[2] = W'($urandom); while (src_w[2] == src_w[0] || src_w[2] == src_w[1]);
    do src_w[3] = W'($urandom); while (src_w[3] == src_w[0] || src_w[3] == src_w[1] || src_w[3] == src_w[2]);
    @(negedge clk);
    c = cv;
    el_a_i = src_w[0]; el_b_i = src_w[1]; opt_a_i = src_w[2]; opt_b_i = src_w[3];
    @(negedge clk);
    // one clock in: outputs must not show the new words yet
    checks++;
    if (el_a_o == src_w[0] && el_b_o == src_w[1] && opt_a_o == src_w[2] && opt_b_o == src_w[3] &&
        el_a_o != el_b_o) failures++;
    el_a_i = ~src_w[0]; el_b_i = ~src_w[1]; opt_a_i = ~src_w[2]; opt_b_i = ~src_w[3];
    @(negedge clk);  // two clocks after the words were presented
  endtask

  initial begin
    cfgs[0] = '{cbits("1000100"), '{2, 3, 0, 1}};
    cfgs[1] = '{cbits("1101000"), '{2, 0, 1, 3}};
    cfgs[2] = '{cbits("1011110"), '{1, 3, 2, 0}};
    cfgs[3] = '{cbits("1001000"), '{2, 3, 1, 0}};
    cfgs[4] = '{cbits("1100000"), '{2, 0, 1, 1}};
    cfgs[5] = '{cbits("1001110"), '{1, 3, 0, 3}};
    c = '0; el_a_i = '0; el_b_i = '0; opt_a_i = '0; opt_b_i = '0;
    #22 rst_n = 1;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 6; k++) begin
        apply(cfgs[k].c);
        for (int o = 0; o < 4; o++) begin
          checks++;
          if (out_w[o] !== src_w[cfgs[k].src[o]]) begin
            failures++;
            $display("config %0d output %0d: got %h want %h", k, o, out_w[o], src_w[cfgs[k].src[o]]);
          end
        end
      end
    for (int v = 0; v < 128; v++) begin
      apply(v[6:0]);
      // every output carries one of the four input words
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (!(out_w[o] == src_w[0] || out_w[o] == src_w[1] || out_w[o] == src_w[2] || out_w[o] == src_w[3])) failures++;
      end
      checks++; if (el_a_o  == src_w[3]) failures++;  // OPT_IN_B -> EL_OUT_A
      checks++; if (el_b_o  == src_w[2]) failures++;  // OPT_IN_A -> EL_OUT_B
      checks++; if (opt_a_o == src_w[3]) failures++;  // OPT_IN_B -> OPT_OUT_A
      checks++; if (opt_b_o == src_w[2]) failures++;  // OPT_IN_A -> OPT_OUT_B
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
