`timescale 1ns/1ps
// tb_icg: counts gated-clock edges for enable patterns and checks that an
// enable change in the middle of a high clock phase does not reach the
// output before the next low phase (no glitch, no clipped pulse).
module tb_icg;
  logic clk = 0, en = 0;
  logic gclk;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `TB_WATCHDOG(clk, 1000)

  icg dut (.clk, .en, .gclk);

  int edges = 0;
  always @(posedge gclk) edges++;
  int glitches = 0;
  always @(gclk) if (gclk && !clk) glitches++;

  initial begin
    @(negedge clk); en = 1;
    repeat (10) @(negedge clk);
    chk(edges == 10, $sformatf("enabled: %0d edges", edges));
    en = 0; edges = 0;
    repeat (10) @(negedge clk);
    chk(edges == 0, "disabled: no edges");
    // enable rises while clk is high: must not shorten the pulse
    @(posedge clk); #2 en = 1;
    #1 chk(gclk == 0, "no pulse from an enable raised while clk high");
    @(posedge clk); #1 chk(gclk == 1, "gated clock passes next cycle");
    #2 en = 0;
    #1 chk(gclk == 1, "pulse not clipped by enable falling while clk high");
    @(negedge clk); #1 chk(gclk == 0, "low with clock");
    @(posedge clk); #1 chk(gclk == 0, "stays off");
    // one-in-four enable
    edges = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); en = (i % 4 == 3);
    end
    @(negedge clk);
    chk(edges == 10, $sformatf("1-in-4: %0d edges", edges));
    chk(glitches == 0, "no glitches");
    finish_tb();
  end
endmodule
