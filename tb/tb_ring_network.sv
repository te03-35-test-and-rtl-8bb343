`timescale 1ns/1ps
// Ring workload: four switch ICs joined into the processor ring for which the
// BUSY BIT scheme is meant, node 0 being the master.
//
// The encoded FRAME and BUSY outputs of node i drive the inputs of node
// i+1 (mod 4) through a wire of 0.25 ns, so every node samples its input a
// quarter period after the upstream node changed it. All nodes share one
// 1 GHz clock. The run follows the life of a network:
//   1. the master holds FRAME create high until the FRAME is low all round
//      the ring, with its request bits 3, 2 and 1 set, then drops it: a FRAME
//      of 3+1 = 4 clocks is created and from then on circulates, each node
//      forwarding it unchanged; the master has grabbed every BUSY BIT except
//      its own (bit 0);
//   2. the master releases those bits;
//   3. node 1 asks for processor 3, node 2 for processor 0 and node 3 for
//      processors 3 and 1: node 1 sees the FRAME first and wins processor 3,
//      node 3 gets only processor 1;
//   4. node 1 releases processor 3, and on the next round node 3, still
//      asking, takes it;
//   5. the master resets the FRAME again and creates a 2-processor FRAME
//      (request bit 3 only), which must be 2 clocks long at every node.
// Requests and grab reads are made at a node only while no FRAME is there,
// right after one has passed, as the scheme requires. The checks are the
// GSTAT registers read through the grab interface clock, the FRAME length
// seen at each node and the constant period of the circulating FRAME.
module tb_ring_network;
  int checks = 0, failures = 0;
  localparam int N = 4;

  logic clk = 1, rst_n = 0;
  logic [N-1:0] frame_out, busy_out, frame_in, busy_in, int_frame, frame_mon_n;
  logic [N-1:0] mt_n = 4'b1110, tc = 0, req_set = 0, req_reset = 0, grab_clk = 0;
  logic [1:0] bit_sel [N] = '{default: 2'b00};
  logic [1:0] frame_mode [N];
  logic [3:0] grab_out [N], gstat [N];
  logic [3:0] dout [N][4];

  always #0.5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_node
    logic el_clk_out, opt_clk_out;
    te03_35_top u_ic (
      .eclk(clk), .eclk_dly(clk), .oclk(clk), .oclk_dly(clk), .sel_elec(1'b1), .sel_opt(1'b1),
      .phi_a(1'b1), .phi1_a(1'b1), .int_sel1(1'b0), .int_sel2(1'b0), .rst_n,
      .el_clk_out, .opt_clk_out, .c(7'b0010001),
      .el_ina(4'h0), .el_inb(4'h0), .opt_ina(4'h0), .opt_inb(4'h0),
      .el_outa(dout[i][0]), .el_outb(dout[i][1]), .opt_outa(dout[i][2]), .opt_outb(dout[i][3]),
      .frame_in(frame_in[i]), .busy_in(busy_in[i]), .phase_sel(1'b0), .mt_n(mt_n[i]),
      .tc(tc[i]), .bit_sel(bit_sel[i]), .req_set(req_set[i]), .req_reset(req_reset[i]),
      .grab_set(1'b0), .grab_reset(1'b0), .grab_clk(grab_clk[i]),
      .frame_out(frame_out[i]), .busy_out(busy_out[i]), .frame_mon_n(frame_mon_n[i]),
      .grab_out(grab_out[i]), .gstat(gstat[i]), .int_frame(int_frame[i]),
      .frame_mode(frame_mode[i])
    );
    // the link from node i-1
    assign #0.25 frame_in[i] = frame_out[(i + N - 1) % N];
    assign #0.25 busy_in[i]  = busy_out[(i + N - 1) % N];
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ FRAME length and period
  int cyc = 0;
  int run_len [N] = '{default: 0};
  int last_len [N] = '{default: 0};
  int rise_at [N] = '{default: -1};
  int period [N] = '{default: 0};
  int passes [N] = '{default: 0};
  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < N; i++) begin
      if (int_frame[i]) begin
        if (run_len[i] == 0) begin
          if (rise_at[i] >= 0) period[i] = cyc - rise_at[i];
          rise_at[i] = cyc;
        end
        run_len[i]++;
      end else if (run_len[i] != 0) begin
        last_len[i] = run_len[i];
        run_len[i] = 0;
        passes[i]++;
      end
    end
  end

  // --------------------------------------------------------------- helpers
  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
    #0.3;
  endtask

  // wait until a FRAME has just left node n
  task automatic after_frame(input int n);
    @(negedge int_frame[n]);
    clocks(1);
  endtask

  task automatic strobe(input int n, input logic [1:0] b, input logic set);
    bit_sel[n] = b; req_set[n] = set; req_reset[n] = ~set;
    clocks(2); req_set[n] = 0; req_reset[n] = 0;
    clocks(1);
  endtask

  task automatic read_gstat(input int n, input logic [3:0] want, input string what);
    grab_clk[n] = 1; clocks(1); grab_clk[n] = 0; clocks(1);
    checks++;
    if (gstat[n] !== want || grab_out[n] !== ~want) begin
      failures++;
      $display("%s: node %0d GSTAT %b, want %b", what, n, gstat[n], want);
    end
  endtask

  task automatic check_lengths(input int want, input string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (last_len[i] != want) begin
        failures++;
        $display("%s: FRAME at node %0d is %0d clocks, want %0d", what, i, last_len[i], want);
      end
    end
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_init = 0, n_create = 0, n_pass_through = 0, n_grab = 0, n_lost = 0, n_release = 0;
  int n_regrab = 0, n_two_proc = 0;

  initial begin
    int p0;
    clocks(3);
    rst_n = 1;
    clocks(2);

    // 1. initialise the ring and create a 4-processor FRAME
    strobe(0, 2'd3, 1); strobe(0, 2'd2, 1); strobe(0, 2'd1, 1);
    tc[0] = 1;
    clocks(4);
    checks++; if (frame_mode[0] != 2'd1) begin failures++; $display("master not in init"); end
    else n_init++;
    clocks(60);
    checks++; if (int_frame != '0) begin failures++; $display("FRAME not reset in ring"); end
    tc[0] = 0;
    after_frame(0);
    checks++; if (last_len[0] != 4) begin failures++; $display("created FRAME %0d clocks", last_len[0]); end
    else n_create++;
    read_gstat(0, 4'b1110, "master after creation");
    // let it go round twice; every node must see a 4-clock FRAME
    p0 = passes[0];
    while (passes[0] < p0 + 2) clocks(1);
    check_lengths(4, "circulating");
    for (int i = 0; i < N; i++) begin
      checks++;
      if (period[i] != period[0] || period[0] < 20) begin
        failures++; $display("FRAME period at node %0d is %0d", i, period[i]);
      end
    end
    if (frame_mode[0] == 2'd0) n_pass_through++;
    $display("ring: FRAME period %0d clocks", period[0]);
    for (int i = 1; i < N; i++) read_gstat(i, 4'b0000, "non-master after creation");

    // 2. the master releases bits 3, 2 and 1
    after_frame(0);
    strobe(0, 2'd3, 0); strobe(0, 2'd2, 0); strobe(0, 2'd1, 0);
    after_frame(0);
    read_gstat(0, 4'b0000, "master after release");
    if (gstat[0] == 4'b0000) n_release++;

    // 3. three nodes ask, two of them for the same processor
    fork
      begin after_frame(1); strobe(1, 2'd3, 1); end
      begin after_frame(2); strobe(2, 2'd0, 1); end
      begin after_frame(3); strobe(3, 2'd3, 1); strobe(3, 2'd1, 1); end
    join
    fork
      begin after_frame(1); read_gstat(1, 4'b1000, "node 1 asks for P3"); end
      begin after_frame(2); read_gstat(2, 4'b0001, "node 2 asks for P0"); end
      begin after_frame(3); read_gstat(3, 4'b0010, "node 3 asks for P3 and P1"); end
    join
    if (gstat[1][3] && !gstat[3][3]) n_lost++;
    if (gstat[1] != 0 && gstat[2] != 0 && gstat[3] != 0) n_grab++;

    // 4. node 1 lets processor 3 go; node 3 is still asking for it
    after_frame(1);
    strobe(1, 2'd3, 0);
    fork
      begin after_frame(1); read_gstat(1, 4'b0000, "node 1 released P3"); end
      begin after_frame(1); after_frame(3); read_gstat(3, 4'b1010, "node 3 takes P3"); end
    join
    if (gstat[3] == 4'b1010) n_regrab++;

    // 5. reset the FRAME and create one for a 2-processor network
    after_frame(0);
    strobe(0, 2'd2, 0); strobe(0, 2'd1, 0); strobe(0, 2'd0, 0); strobe(0, 2'd3, 1);
    tc[0] = 1;
    clocks(60);
    checks++; if (int_frame != '0) begin failures++; $display("FRAME not reset in ring"); end
    tc[0] = 0;
    after_frame(0);
    p0 = passes[0];
    while (passes[0] < p0 + 2) clocks(1);
    check_lengths(2, "2-processor FRAME");
    if (last_len[0] == 2) n_two_proc++;

    // every mechanism must have happened
    mech_n = '{n_init, n_create, n_pass_through, n_grab, n_lost, n_release, n_regrab, n_two_proc};
    foreach (mech_n[k]) begin
      checks++;
      if (mech_n[k] == 0) begin failures++; $display("mechanism '%s' never happened", mech_name[k]); end
    end
    $display("init %0d, create %0d, pass-through %0d, grab %0d, lost %0d, release %0d, regrab %0d, 2-proc %0d",
             n_init, n_create, n_pass_through, n_grab, n_lost, n_release, n_regrab, n_two_proc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mech_n [8];
  string mech_name [8] = '{"init", "create", "pass-through", "grab", "contention", "release",
                           "grab after release", "2-processor FRAME"};
endmodule
