`timescale 1ns/1ps
// tb_adpll: 25 MHz reference; checks lock and the output period for
// 200 MHz (x8), 100 MHz (x4) and 1 GHz (x40), and that lock drops on a new
// setting.
module tb_adpll;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic [7:0] mult = 8, div = 1;
  logic clk_out, lock;
  always #20 clk = ~clk;
  `include "tb_common.svh"
  `TB_WATCHDOG(clk, 5000)

  adpll #(.LOCK_CYCLES(16)) dut (.ref_clk(clk), .rst_n, .mult, .div, .clk_out, .lock);

  task automatic measure(input real expect_ns);
    realtime t0, t1;
    wait (lock);
    @(posedge clk_out); t0 = $realtime;
    repeat (100) @(posedge clk_out);
    t1 = $realtime;
    chk((t1 - t0) / 100.0 > expect_ns * 0.99 && (t1 - t0) / 100.0 < expect_ns * 1.01,
        $sformatf("period %f ns, expected %f", (t1 - t0) / 100.0, expect_ns));
  endtask

  initial begin
    #100 rst_n = 1;
    measure(5.0);
    mult = 4;
    @(posedge clk); @(posedge clk); #1;
    chk(!lock, "lock drops on change");
    measure(10.0);
    mult = 40;
    @(posedge clk); @(posedge clk); #1;
    measure(1.0);
    mult = 8; div = 2;
    @(posedge clk); @(posedge clk); #1;
    measure(10.0);
    finish_tb();
  end
endmodule
