`timescale 1ns/1ps
// Testbench for busy_bit_unit at the level of encoded symbols.
// Each clock it sends one encoded FRAME and one encoded BUSY symbol and
// records the two output symbols, which must always be valid code words.
// - Pass-through with random data: both channels must come out unchanged
//   exactly four clocks later (the documented latency).
// - Inversion control: symbols received half a symbol off (complemented
//   earlier chip) decode correctly with phase_sel = 1.
// - FRAME reset: a master with TCp high sends FRAME = 0 whatever arrives.
// - FRAME creation: with request bits 3 (and 2) set, TCp falling creates a
//   FRAME of 2 (3) clocks whose BUSY BITs are the requested ones.
// - The request/grab measurement: FRAME 011110 with BUSY IN 100001 and bit 3
//   requested gives BUSY OUT 110001; after releasing, bit 3 comes back free
//   and the grab outputs show the grab and the release.
module tb_busy_bit_unit;
  int checks = 0, failures = 0;
  int n_pass = 0, n_init = 0, n_create = 0, n_inv = 0, n_grab = 0, n_release = 0;
  logic clk = 0, rst_n = 0, gclk = 0;
  logic [1:0] frame_sym = 2'b10, busy_sym = 2'b10;
  logic phase_sel = 0, ms_n = 1, fc_in = 0;
  logic [1:0] bit_sel = 0;
  logic req_set = 0, req_reset = 0, grab_set = 0, grab_reset = 0;
  logic [1:0] frame_out_sym, busy_out_sym;
  logic frame_mon_n, frame;
  logic [3:0] gstat, grab_out;
  logic [1:0] frame_mode;

  busy_bit_unit dut (.rx_clk(clk), .*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LAT = 4;
  int t = 0;
  logic fi [4096], bi [4096], fo [4096], bo [4096];

  // send one symbol pair; skew = 1 sends it half a symbol off (complemented
  // earlier chip), which phase_sel must undo
  task automatic cyc(input logic fb, input logic bb, input logic skew = 0);
    @(negedge clk);
    fi[t] = fb; bi[t] = bb;
    frame_sym = skew ? {fb, ~fb} : {~fb, fb};
    busy_sym  = skew ? {bb, ~bb} : {~bb, bb};
    #1;
    checks++;
    if (frame_out_sym[1] !== ~frame_out_sym[0] || busy_out_sym[1] !== ~busy_out_sym[0]) failures++;
    fo[t] = frame_out_sym[0]; bo[t] = busy_out_sym[0];
    t++;
  endtask

  task automatic strobe(input logic [1:0] b, input logic set);
    @(negedge clk); bit_sel = b; req_set = set; req_reset = ~set;
    @(negedge clk); req_set = 0; req_reset = 0;
  endtask

  // send a pattern (first character first) and return what left the unit
  // LAT clocks later for the same positions
  task automatic pattern(input string f, input string b, output string fout, output string bout);
    int t0;
    t0 = t;
    for (int i = 0; i < f.len(); i++) cyc(f[i] == "1", b[i] == "1");
    for (int i = 0; i < LAT; i++) cyc(0, 1);
    fout = ""; bout = "";
    for (int i = 0; i < f.len(); i++) begin
      fout = {fout, fo[t0 + i + LAT] ? "1" : "0"};
      bout = {bout, bo[t0 + i + LAT] ? "1" : "0"};
    end
  endtask

  task automatic expect_s(input string what, input string got, input string want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %s want %s", what, got, want); end
  endtask

  // frame monitor output: the internal FRAME of the previous clock, inverted
  logic last_frame = 0;
  int n_mon = 0;
  always @(negedge clk) begin
    if (rst_n && t > 2) begin
      checks++;
      if (frame_mon_n !== ~last_frame) failures++;
      if (!frame_mon_n) n_mon++;
    end
    last_frame = frame;
  end

  always @(posedge clk) if (rst_n) begin
    if (frame_mode == 2'd1) n_init++;
    if (frame_mode == 2'd2) n_create++;
  end

  initial begin
    string fs, bs;
    #22 rst_n = 1;
    repeat (3) cyc(0, 1);
    // pass-through with random data, latency LAT
    begin
      int t0;
      t0 = t;
      for (int i = 0; i < 200; i++) cyc(1'($urandom), 1'($urandom));
      for (int i = 0; i < 200 - LAT; i++) begin
        checks++;
        if (fo[t0 + i + LAT] !== fi[t0 + i] || bo[t0 + i + LAT] !== bi[t0 + i]) failures++;
        else n_pass++;
      end
      // the output may not match at any other latency
      checks++;
      begin
        int same;
        same = 0;
        for (int i = 0; i < 190; i++) if (fo[t0 + i + LAT - 1] === fi[t0 + i]) same++;
        if (same == 190) failures++;
      end
    end
    // inversion control
    phase_sel = 1;
    begin
      int t0;
      t0 = t;
      for (int i = 0; i < 60; i++) cyc(1'($urandom), 1'($urandom), 1);
      phase_sel = 0;  // takes effect on symbols after the last skewed one
      for (int i = 0; i < LAT; i++) cyc(0, 1);
      for (int i = 0; i < 60 - 1; i++) begin
        checks++;
        if (fo[t0 + i + LAT] !== fi[t0 + i]) failures++; else n_inv++;
      end
    end
    // request/grab: request #3, BUSY IN complement of FRAME
    strobe(2'd3, 1);
    repeat (3) cyc(0, 1);
    pattern("011110", "100001", fs, bs);
    expect_s("frame pass", fs, "011110");
    expect_s("busy out, request 3", bs, "110001");
    @(negedge clk); gclk = 1; @(negedge clk); gclk = 0;
    checks++; if (grab_out !== 4'b0111) failures++; else n_grab++;
    // request #1 too
    strobe(2'd1, 1);
    repeat (3) cyc(0, 1);
    pattern("011110", "110001", fs, bs);
    expect_s("busy out, request 3,1", bs, "110101");
    // release both
    strobe(2'd1, 0); strobe(2'd3, 0);
    repeat (3) cyc(0, 1);
    pattern("011110", "110101", fs, bs);
    expect_s("busy out, release", bs, "100001");
    @(negedge clk); gclk = 1; @(negedge clk); gclk = 0;
    checks++; if (grab_out !== 4'b1111) failures++; else n_release++;
    // FRAME reset: master with TCp high
    ms_n = 0; fc_in = 1;
    repeat (3) cyc(0, 1);
    pattern("0110101101011101", "1111111111111111", fs, bs);
    expect_s("frame reset", fs, "0000000000000000");
    // FRAME creation with request bit 3 set: FRAME of 2
    strobe(2'd3, 1);
    repeat (4) cyc(0, 0);
    begin
      int t0, len;
      string bits;
      @(negedge clk); fc_in = 0;
      t0 = t;
      for (int i = 0; i < 12; i++) cyc(0, 0);
      len = 0; bits = "";
      for (int i = t0; i < t; i++) if (fo[i]) begin len++; bits = {bits, bo[i] ? "1" : "0"}; end
      checks++; if (len != 2) begin failures++; $display("created FRAME length %0d, want 2", len); end
      expect_s("busy bits of created frame (1 request)", bits, "10");
    end
    // and with bits 3 and 2: FRAME of 3
    fc_in = 1; strobe(2'd2, 1);
    repeat (6) cyc(0, 0);
    begin
      int t0, len;
      string bits;
      @(negedge clk); fc_in = 0;
      t0 = t;
      for (int i = 0; i < 12; i++) cyc(0, 0);
      len = 0; bits = "";
      for (int i = t0; i < t; i++) if (fo[i]) begin len++; bits = {bits, bo[i] ? "1" : "0"}; end
      checks++; if (len != 3) begin failures++; $display("created FRAME length %0d, want 3", len); end
      expect_s("busy bits of created frame (2 requests)", bits, "110");
    end
    // after creation the master is in pass-through again
    pattern("0111100", "1000011", fs, bs);
    expect_s("master pass-through after creation", fs, "0111100");
    ms_n = 1;
    checks++;
    if (n_pass == 0 || n_init == 0 || n_create == 0 || n_inv == 0 || n_mon == 0 || n_grab == 0 || n_release == 0) begin
      failures++;
      $display("mechanism not seen: pass=%0d init=%0d create=%0d inv=%0d grab=%0d release=%0d",
               n_pass, n_init, n_create, n_inv, n_grab, n_release);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
