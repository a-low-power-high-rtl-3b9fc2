`timescale 1ns/1ps
// tb_power_switch: the gated supply drops as soon as Sleep rises and is
// good again RAMP_NS after Sleep falls.
module tb_power_switch;
  logic clk = 0, sleep = 0, vdd_ok;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `TB_WATCHDOG(clk, 1000)

  power_switch #(.RAMP_NS(50)) dut (.sleep, .vdd_ok);

  initial begin
    #10 chk(vdd_ok, "on at start");
    sleep = 1; #1 chk(!vdd_ok, "off right after sleep");
    #100 sleep = 0;
    #40 chk(!vdd_ok, "still ramping at 40 ns");
    #20 chk(vdd_ok, "on after 60 ns");
    finish_tb();
  end
endmodule
