`timescale 1ns/1ps
// Data path workload: 2^31-1 PRBS on every lane, as in the chip's bit-error
// measurements at 2.0 Gb/s and 2.25 Gb/s.
//
// Each of the 16 input lanes carries its own PRBS-31 sequence
// (x^31 + x^28 + 1, a different seed per lane). The four output ports are
// watched by self-synchronising PRBS checkers: once 31 bits have been seen,
// every received bit must equal the XOR of the bits received 31 and 28 slots
// earlier. The switch is set to the first and third documented
// configurations in turn, and the run is made at a 1 GHz clock (2.0 Gb/s
// per lane) and at 1.125 GHz (2.25 Gb/s per lane); as a digital model the
// RTL has no timing limit, so the second rate checks the same function at
// the other clock. Errors, checked bits and both rates are counted; a rate
// at which too few bits were checked counts as a failure.
module tb_prbs_datapath;
  int checks = 0, failures = 0;
  real half = 0.5;  // half clock period, ns

  logic eclk = 1, oclk = 1;
  logic [6:0] c = 7'b0010001;
  logic rst_n = 0;
  logic [3:0] el_ina, el_inb, opt_ina, opt_inb, el_outa, el_outb, opt_outa, opt_outb;
  logic el_clk_out, opt_clk_out, frame_out, busy_out, frame_mon_n, int_frame;
  logic [3:0] grab_out, gstat;
  logic [1:0] frame_mode;

  te03_35_top dut (
    .eclk, .eclk_dly(eclk), .oclk, .oclk_dly(oclk), .sel_elec(1'b1), .sel_opt(1'b1),
    .phi_a(1'b1), .phi1_a(1'b1), .int_sel1(1'b0), .int_sel2(1'b0), .rst_n,
    .el_clk_out, .opt_clk_out, .c, .el_ina, .el_inb, .opt_ina, .opt_inb,
    .el_outa, .el_outb, .opt_outa, .opt_outb,
    .frame_in(1'b0), .busy_in(1'b0), .phase_sel(1'b0), .mt_n(1'b1), .tc(1'b0),
    .bit_sel(2'b00), .req_set(1'b0), .req_reset(1'b0), .grab_set(1'b0), .grab_reset(1'b0),
    .grab_clk(1'b0), .frame_out, .busy_out, .frame_mon_n, .grab_out, .gstat, .int_frame,
    .frame_mode
  );

  always #(half) begin eclk = ~eclk; oclk = ~oclk; end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PRBS-31 generators, one per input lane
  logic [30:0] gen [16];
  // checkers, one per output lane
  logic [30:0] hist [16];
  int seen [16];
  int errors = 0, checked = 0;
  bit checking = 0;

  function automatic logic prbs_next(inout logic [30:0] s);
    logic b;
    b = s[30] ^ s[27];
    s = {s[29:0], b};
    return b;
  endfunction

  // slot s: inputs change a quarter period after a clock edge, outputs are
  // sampled a little later in the same slot
  initial begin
    logic [15:0] d, q;
    for (int i = 0; i < 16; i++) gen[i] = 31'h1234567 * (i + 1) + 31'h55;
    forever begin
      #(half / 2);
      for (int i = 0; i < 16; i++) d[i] = prbs_next(gen[i]);
      {opt_inb, opt_ina, el_inb, el_ina} = d;
      #(half / 10);
      q = {opt_outb, opt_outa, el_outb, el_outa};
      if (checking)
        for (int i = 0; i < 16; i++) begin
          if (seen[i] >= 31) begin
            checked++;
            if (q[i] !== (hist[i][30] ^ hist[i][27])) errors++;
          end
          hist[i] = {hist[i][29:0], q[i]};
          seen[i]++;
        end
      #(half - half / 2 - half / 10);
    end
  end

  task automatic run(input string cfg, input int slots);
    @(posedge eclk); c = 7'b0;
    for (int i = 0; i < 7; i++) c[i] = (cfg[i] == "1");
    checking = 0;
    repeat (12) @(posedge eclk);   // let the new path fill
    for (int i = 0; i < 16; i++) seen[i] = 0;
    checking = 1;
    repeat (slots / 2) @(posedge eclk);
    checking = 0;
  endtask

  initial begin
    #3.3 rst_n = 1;
    foreach (half_list[k]) begin
      half = half_list[k];
      errors = 0; checked = 0;
      run("1000100", 4000);
      run("1011110", 4000);
      checks++;
      if (errors != 0 || checked < 16 * 7000) begin
        failures++;
        $display("half period %0.4f ns: %0d errors in %0d bits", half, errors, checked);
      end
      $display("%0.2f Gb/s per lane: %0d bits checked, %0d errors", 1.0 / half, checked, errors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real half_list [2] = '{0.5, 0.4444};
endmodule
