`timescale 1ns/1ps
// tb_timer: one-shot and periodic counting with and without prescaler;
// checks the expiry time in clocks, reload, the interrupt enable and clear.
module tb_timer;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 20000)

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic irq, expired;

  timer dut (.clk, .rst_n, .req, .rsp, .irq, .expired);

  task automatic time_expiry(output int n);
    n = 0;
    while (!expired) begin @(posedge clk); n++; end
  endtask

  initial begin
    logic [31:0] q;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_write(20'h00, 20);
    apb_read(20'h04, q);
    chk(q == 20, "VALUE loaded");
    apb_write(20'h08, 32'b001);            // one-shot, no interrupt
    time_expiry(n);
    chk(n >= 20 && n <= 22, $sformatf("one-shot expiry after %0d clocks", n));
    #1 chk(!irq, "no irq when disabled");
    apb_read(20'h08, q);
    chk(q[0] == 0, "one-shot stops");
    apb_write(20'h0C, 1);
    chk(!expired, "flag cleared");
    // periodic with prescaler 3: 4 clocks per step, LOAD 9 -> 40 clocks
    apb_write(20'h10, 3);
    apb_write(20'h00, 9);
    apb_write(20'h08, 32'b111);
    time_expiry(n);
    chk(n >= 40 && n <= 42, $sformatf("prescaled expiry after %0d clocks", n));
    #1 chk(irq, "irq when enabled");
    apb_write(20'h0C, 1);
    time_expiry(n);
    chk(n >= 30 && n <= 42, $sformatf("periodic reload: next expiry after %0d", n));
    apb_read(20'h08, q);
    chk(q[0] == 1, "periodic keeps running");
    finish_tb();
  end
endmodule
