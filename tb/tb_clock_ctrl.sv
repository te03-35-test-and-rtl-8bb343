`timescale 1ns/1ps
// Testbench for clock_ctrl: applies every combination of the four clock
// levels and six selects and compares the four derived clocks with the
// intended selection (bypass, 0/180 phase inversion, chain select).
module tb_clock_ctrl;
  int checks = 0, failures = 0;
  logic eclk, eclk_dly, oclk, oclk_dly, sel_elec, sel_opt, phi_a, phi1_a, int_sel1, int_sel2;
  logic el_if_clk, opt_if_clk, chain1_clk, chain2_clk;

  clock_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e, o;
    for (int v = 0; v < 1024; v++) begin
      {eclk, eclk_dly, oclk, oclk_dly, sel_elec, sel_opt, phi_a, phi1_a, int_sel1, int_sel2} = v[9:0];
      #1;
      e = (sel_elec == 1'b1) ? eclk : eclk_dly;
      o = (sel_opt  == 1'b1) ? oclk : oclk_dly;
      checks++; if (el_if_clk  !== (phi_a  ? ~e : e)) failures++;
      checks++; if (opt_if_clk !== (phi1_a ? ~o : o)) failures++;
      checks++; if (chain1_clk !== (int_sel1 ? o : e)) failures++;
      checks++; if (chain2_clk !== (int_sel2 ? o : e)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
