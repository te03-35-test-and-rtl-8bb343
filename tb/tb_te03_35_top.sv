`timescale 1ns/1ps
// End-to-end testbench of the TE03_35 switch at its only (full) size.
//
// Clocks run at 1 GHz, so every lane carries one bit per 0.5 ns (2 Gb/s).
// All 16 data input lanes carry random bits; the testbench records the 16
// output lanes in the middle of every bit slot.
// Data path: each of the six documented switch configurations, and random
// other control words, are applied; after a flush every output lane must
// repeat the lane of the source the configuration names, delayed by a fixed
// number of bit slots (8 slots, four clocks, with the reference clock
// setup). This is repeated with the delay chains in use instead of
// bypassed, with the internal clocks taken from the optical clock, and with
// the interface clocks not shifted (0 degrees), where the latency must again
// be constant.
// BUSY BIT: FRAME and BUSY BIT are sent in the line code; pass-through,
// request/grab/release with the grab outputs, FRAME reset and FRAME
// creation, and the decoder inversion control are exercised and checked,
// including the six-clock pin-to-pin latency of the FRAME channel.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_te03_35_top;
  int checks = 0, failures = 0;

  logic eclk = 1, oclk = 1, eclk_dly, oclk_dly;
  logic sel_elec = 1, sel_opt = 1, phi_a = 1, phi1_a = 1, int_sel1 = 0, int_sel2 = 0;
  logic rst_n = 0;
  logic el_clk_out, opt_clk_out;
  logic [6:0] c = 7'b0010001;  // C0 = 1, C4 = 1 (first documented configuration)
  logic [3:0] el_ina, el_inb, opt_ina, opt_inb, el_outa, el_outb, opt_outa, opt_outb;
  logic frame_in, busy_in, phase_sel = 0, mt_n = 1, tc = 0;
  logic [1:0] bit_sel = 0;
  logic req_set = 0, req_reset = 0, grab_set = 0, grab_reset = 0, grab_clk = 0;
  logic frame_out, busy_out, frame_mon_n, int_frame;
  logic [3:0] grab_out, gstat;
  logic [1:0] frame_mode;

  te03_35_top dut (.*);

  always #0.5 begin eclk = ~eclk; oclk = ~oclk; end
  // stand-in for the analog delay chains
  always @(eclk) eclk_dly <= #0.1 eclk;
  always @(oclk) oclk_dly <= #0.1 oclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  localparam int NS = 60000;  // bit slots recorded
  logic [15:0] din_s [NS];    // {opt_inb, opt_ina, el_inb, el_ina}
  logic [15:0] dout_s [NS];   // {opt_outb, opt_outa, el_outb, el_outa}
  logic fin_s [NS], bin_s [NS], fout_s [NS], bout_s [NS];
  int slot = 0;

  initial begin
    for (int s = 0; s < NS; s++) begin
      din_s[s] = 16'($urandom);
      fin_s[s] = s[0];   // idle: encoded 0 on FRAME ("01")
      bin_s[s] = ~s[0];  // idle: encoded 1 on BUSY ("10")
    end
  end

  // slot s is driven from 0.25 + 0.5 s to 0.75 + 0.5 s and read back at 0.3 + 0.5 s
  initial begin
    #0.25;
    forever begin
      {opt_inb, opt_ina, el_inb, el_ina} = din_s[slot];
      frame_in = fin_s[slot];
      busy_in  = bin_s[slot];
      #0.05;
      dout_s[slot] = {opt_outb, opt_outa, el_outb, el_outa};
      fout_s[slot] = frame_out;
      bout_s[slot] = busy_out;
      #0.45;
      slot++;
      if (slot >= NS) begin
        failures++;
        $display("out of recorded slots");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // ------------------------------------------------------------- data path
  function automatic logic [3:0] lane(input logic [15:0] w, input int ch);
    return w[4*ch +: 4];
  endfunction

  // expected source channel per output (0 EL_A, 1 EL_B, 2 OPT_A, 3 OPT_B),
  // from the six documented configurations
  typedef struct { logic [6:0] c; int src [4]; } cfg_t;
  cfg_t cfgs [6];
  function automatic logic [6:0] cbits(input string s);
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[i] = (s[i] == "1");
    return r;
  endfunction

  int n_cfg [6];
  int n_broadcast = 0, n_delay_chain = 0, n_opt_clock = 0, n_phase0 = 0, n_random_cfg = 0;

  // run `len` slots and return the latency (in slots) at which every output
  // lane matches its source, or -1
  task automatic run_data(input int src [4], input int len, output int lat);
    int s0;
    s0 = slot + 24;  // flush
    while (slot < s0 + len + 24) #1;
    lat = -1;
    for (int L = 0; L < 24 && lat < 0; L++) begin
      bit ok = 1'b1;
      for (int u = s0; u < s0 + len; u++)
        for (int o = 0; o < 4; o++)
          if (lane(dout_s[u], o) !== lane(din_s[u - L], src[o])) ok = 1'b0;
      if (ok) lat = L;
    end
  endtask

  task automatic data_config(input int k, input int want_lat);
    int lat;
    c = cfgs[k].c;
    run_data(cfgs[k].src, 200, lat);
    checks++;
    if (lat != want_lat) begin
      failures++;
      $display("config %0d (c=%b): latency %0d, want %0d", k, c, lat, want_lat);
    end else n_cfg[k]++;
  endtask

  // ------------------------------------------------------------- BUSY BIT
  localparam int BLAT = 6;  // pin-to-pin latency of the FRAME/BUSY channels, clocks

  // write internal bits for clock n onward (two chips per clock); skew sends
  // every pair one slot late, so the receiver sees the complemented chip first
  task automatic put_pattern(input int n0, input string f, input string b, input bit skew = 0);
    for (int i = 0; i < f.len(); i++) begin
      logic fb, bb;
      int s;
      fb = (f[i] == "1"); bb = (b[i] == "1");
      s = 2 * (n0 + i) + (skew ? 1 : 0);
      fin_s[s] = fb; fin_s[s + 1] = ~fb;
      bin_s[s] = bb; bin_s[s + 1] = ~bb;
    end
  endtask

  // internal bit leaving on clock m (earlier chip); code checked
  function automatic string got_frame(input int m0, input int len);
    string r = "";
    for (int i = 0; i < len; i++) r = {r, fout_s[2 * (m0 + i)] ? "1" : "0"};
    return r;
  endfunction
  function automatic string got_busy(input int m0, input int len);
    string r = "";
    for (int i = 0; i < len; i++) r = {r, bout_s[2 * (m0 + i)] ? "1" : "0"};
    return r;
  endfunction

  task automatic check_code(input int m0, input int len);
    for (int i = 0; i < len; i++) begin
      checks++;
      if (fout_s[2 * (m0 + i) + 1] !== ~fout_s[2 * (m0 + i)] ||
          bout_s[2 * (m0 + i) + 1] !== ~bout_s[2 * (m0 + i)]) failures++;
    end
  endtask

  task automatic expect_s(input string what, input string got, input string want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %s want %s", what, got, want); end
  endtask

  task automatic wait_clocks(input int n);
    repeat (n) @(posedge opt_clk_out);
    #0.3;
  endtask

  task automatic strobe(input logic [1:0] b, input logic set);
    wait_clocks(1); bit_sel = b; req_set = set; req_reset = ~set;
    wait_clocks(2); req_set = 0; req_reset = 0;
    wait_clocks(2);
  endtask

  task automatic grab_pulse();
    wait_clocks(1); grab_clk = 1; wait_clocks(1); grab_clk = 0;
  endtask

  // send a pattern a few clocks ahead and return what left BLAT clocks later
  task automatic busy_pattern(input string f, input string b, output string fo, output string bo,
                              input bit skew = 0);
    int n0;
    n0 = slot / 2 + 4;
    put_pattern(n0, f, b, skew);
    while (slot < 2 * (n0 + f.len() + BLAT) + 6) #1;
    // a pair sent one chip late completes one clock later
    fo = got_frame(n0 + BLAT + (skew ? 1 : 0), f.len());
    bo = got_busy(n0 + BLAT + (skew ? 1 : 0), f.len());
    check_code(n0 + BLAT, f.len());
  endtask

  int n_pass = 0, n_init = 0, n_create = 0, n_grab = 0, n_release = 0, n_inv = 0, n_mon = 0;
  always @(posedge opt_clk_out) if (rst_n) begin
    if (frame_mode == 2'd1) n_init++;
    if (frame_mode == 2'd2) n_create++;
    if (!frame_mon_n) n_mon++;
  end

  initial begin
    int lat;
    string fs, bs;
    cfgs[0] = '{cbits("1000100"), '{2, 3, 0, 1}};
    cfgs[1] = '{cbits("1101000"), '{2, 0, 1, 3}};
    cfgs[2] = '{cbits("1011110"), '{1, 3, 2, 0}};
    cfgs[3] = '{cbits("1001000"), '{2, 3, 1, 0}};
    cfgs[4] = '{cbits("1100000"), '{2, 0, 1, 1}};
    cfgs[5] = '{cbits("1001110"), '{1, 3, 0, 3}};
    #3.3 rst_n = 1;

    // ---- data path, reference clock setup: bypass, 180 degrees, electrical clock
    for (int k = 0; k < 6; k++) data_config(k, 8);
    n_broadcast = n_cfg[4] + n_cfg[5];
    // random control words: each output must follow a permitted source
    for (int r = 0; r < 20; r++) begin
      int src [4];
      logic [6:0] cv;
      cv = 7'($urandom);
      // sources implied by the control word, worked out per output
      src[0] = cv[5] ? 1 : 2;
      src[1] = cv[1] ? 0 : 3;
      src[2] = cv[2] ? 2 : (cv[4] ? 0 : 1);
      src[3] = !cv[3] ? 1 : ((cv[1] || (cv[4] && !cv[2])) ? 3 : 0);
      c = cv;
      run_data(src, 100, lat);
      checks++;
      if (lat != 8) begin failures++; $display("control %b: latency %0d", cv, lat); end
      else n_random_cfg++;
    end
    // ---- delay chains in use
    sel_elec = 0; sel_opt = 0;
    data_config(2, 8);
    n_delay_chain = n_cfg[2] - 1;
    sel_elec = 1; sel_opt = 1;
    // ---- internal clocks from the optical clock
    int_sel1 = 1; int_sel2 = 1;
    data_config(3, 8);
    n_opt_clock = n_cfg[3] - 1;
    int_sel1 = 0; int_sel2 = 0;
    // ---- interface clocks at 0 degrees: constant latency
    phi_a = 0; phi1_a = 0;
    c = cfgs[0].c;
    run_data(cfgs[0].src, 200, lat);
    checks++;
    if (lat < 0) begin failures++; $display("0-degree electrical clock: no constant latency"); end
    else n_phase0++;
    phi_a = 1; phi1_a = 1;
    c = cfgs[0].c;

    // ---- BUSY BIT: pass-through, no requests
    busy_pattern("0111100", "1000011", fs, bs);
    expect_s("frame pass-through", fs, "0111100");
    expect_s("busy pass-through", bs, "1000011");
    if (fs == "0111100") n_pass++;
    // FRAME/BUSY latency: a single FRAME bit must leave exactly BLAT clocks later
    begin
      int n0, seen;
      n0 = slot / 2 + 4;
      put_pattern(n0, "1", "0");
      while (slot < 2 * (n0 + BLAT + 6)) #1;
      seen = -1;
      for (int m = n0; m < n0 + BLAT + 4; m++) if (fout_s[2 * m] && seen < 0) seen = m - n0;
      checks++;
      if (seen != BLAT) begin failures++; $display("FRAME latency %0d clocks, want %0d", seen, BLAT); end
    end
    // request and grab #3
    strobe(2'd3, 1);
    busy_pattern("0111100", "1000011", fs, bs);
    expect_s("busy out, request 3", bs, "1100011");
    grab_pulse();
    checks++; if (grab_out !== 4'b0111 || gstat !== 4'b1000) begin failures++; $display("grab_out %b", grab_out); end
    else n_grab++;
    // request #1 as well: BUSY IN 1100 (our own #3) gives 1010 more
    strobe(2'd1, 1);
    busy_pattern("0111100", "1100011", fs, bs);
    expect_s("busy out, request 3,1", bs, "1101011");
    // release both
    strobe(2'd1, 0); strobe(2'd3, 0);
    busy_pattern("0111100", "1101011", fs, bs);
    expect_s("busy out, release", bs, "1000011");
    grab_pulse();
    checks++; if (grab_out !== 4'b1111) failures++; else n_release++;
    // inversion control: pairs arrive one chip late, phase_sel restores them
    phase_sel = 1;
    busy_pattern("0111100", "1000011", fs, bs, 1);
    expect_s("frame with inversion control", fs, "0111100");
    if (fs == "0111100") n_inv++;
    phase_sel = 0;
    busy_pattern("0000000", "1111111", fs, bs);
    // FRAME reset: master with TCp high
    mt_n = 0; tc = 1;
    busy_pattern("0110110110", "1111111111", fs, bs);
    expect_s("frame reset", fs, "0000000000");
    // FRAME creation with requests 3 and 2: FRAME of 3 clocks, BUSY 110
    strobe(2'd3, 1); strobe(2'd2, 1);
    begin
      int n0, first, len;
      string bits;
      n0 = slot / 2 + 2;
      put_pattern(n0, "00000000000000000000", "00000000000000000000");
      wait_clocks(4);
      tc = 0;
      while (slot < 2 * (n0 + 20)) #1;
      first = -1; len = 0; bits = "";
      for (int m = n0; m < n0 + 20; m++) if (fout_s[2 * m]) begin
        len++; bits = {bits, bout_s[2 * m] ? "1" : "0"};
      end
      checks++;
      if (len != 3) begin failures++; $display("created FRAME length %0d, want 3", len); end
      expect_s("busy bits of the created FRAME", bits, "110");
    end
    // the master is back in pass-through
    busy_pattern("0111100", "1000011", fs, bs);
    expect_s("master pass-through after creation", fs, "0111100");
    mt_n = 1;

    // ---- every mechanism must have happened
    begin
      int counts [20];
      string names [20];
      int n = 0;
      for (int k = 0; k < 6; k++) begin counts[n] = n_cfg[k]; names[n] = $sformatf("config %0d", k); n++; end
      counts[n] = n_broadcast;   names[n] = "broadcast";          n++;
      counts[n] = n_random_cfg;  names[n] = "other control word"; n++;
      counts[n] = n_delay_chain; names[n] = "delay chain in use"; n++;
      counts[n] = n_opt_clock;   names[n] = "optical internal clock"; n++;
      counts[n] = n_phase0;      names[n] = "0-degree phase";     n++;
      counts[n] = n_pass;        names[n] = "FRAME pass-through"; n++;
      counts[n] = n_init;        names[n] = "FRAME reset";        n++;
      counts[n] = n_create;      names[n] = "FRAME creation";     n++;
      counts[n] = n_grab;        names[n] = "BUSY BIT grab";      n++;
      counts[n] = n_release;     names[n] = "BUSY BIT release";   n++;
      counts[n] = n_inv;         names[n] = "inversion control";  n++;
      counts[n] = n_mon;         names[n] = "FRAME monitor";      n++;
      for (int i = 0; i < n; i++) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism never seen: %s", names[i]); end
      end
      $display("mechanisms: cfg=%0d/%0d/%0d/%0d/%0d/%0d broadcast=%0d random=%0d delay=%0d optclk=%0d phase0=%0d pass=%0d init=%0d create=%0d grab=%0d release=%0d inv=%0d mon=%0d",
               n_cfg[0], n_cfg[1], n_cfg[2], n_cfg[3], n_cfg[4], n_cfg[5], n_broadcast, n_random_cfg,
               n_delay_chain, n_opt_clock, n_phase0, n_pass, n_init, n_create, n_grab, n_release, n_inv, n_mon);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
