`timescale 1ns/1ps
// tb_clk_gen: checks the clock select and clk_ok, and that peri_tick is
// high exactly one system cycle in four (200 MHz to 50 MHz).
module tb_clk_gen;
  logic ext_clk = 0, pll_clk = 0, pll_lock = 0, clk_sel = 0, rst_n = 0;
  logic sys_clk, clk_ok, peri_tick;
  logic clk;
  always #2.5 ext_clk = ~ext_clk;
  always #1.25 pll_clk = ~pll_clk;
  assign clk = ext_clk;
  `include "tb_common.svh"
  `TB_WATCHDOG(clk, 2000)

  clk_gen #(.RATIO(4)) dut (.ext_clk, .pll_clk, .pll_lock, .clk_sel, .rst_n, .sys_clk, .clk_ok, .peri_tick);

  int ticks, cycles, gap, last, bad_gap;
  always @(posedge sys_clk) begin
    cycles++;
    if (peri_tick) begin
      ticks++;
      if (last != 0 && cycles - last != 4) bad_gap++;
      last = cycles;
    end
  end

  initial begin
    #1;
    chk(clk_ok == 1, "external clock is ok at once");
    #20 rst_n = 1;
    repeat (400) @(posedge ext_clk);
    chk(ticks >= 99 && ticks <= 101, $sformatf("%0d ticks in 400 cycles", ticks));
    chk(bad_gap == 0, "tick every 4 cycles");
    clk_sel = 1; #1;
    chk(sys_clk == pll_clk && clk_ok == 0, "ADPLL selected, not locked");
    pll_lock = 1; #1;
    chk(clk_ok == 1, "ok after lock");
    clk_sel = 0; #1;
    chk(sys_clk == ext_clk, "external selected");
    finish_tb();
  end
endmodule
