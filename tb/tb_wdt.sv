`timescale 1ns/1ps
// tb_wdt: a fed watchdog never fires; an unfed one fires after LOAD clocks,
// raising irq and (when enabled) the reset request; a wrong key does not
// feed it.
module tb_wdt;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 20000)

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic irq, rst_req;

  wdt dut (.clk, .rst_n, .req, .rsp, .irq, .rst_req);

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_write(20'h00, 50);
    apb_write(20'h08, 3);
    for (int i = 0; i < 10; i++) begin
      repeat (30) @(posedge clk);
      apb_write(20'h0C, 32'hA5);
    end
    chk(!irq && !rst_req, "fed watchdog stays quiet");
    apb_write(20'h0C, 32'h5A);     // wrong key
    n = 0;
    while (!rst_req) begin @(posedge clk); n++; end
    chk(n >= 40 && n <= 52, $sformatf("fires %0d clocks after last feed", n));
    chk(irq, "irq with reset request");
    apb_write(20'h08, 1);
    #1 chk(!rst_req && irq, "reset request off when reset disabled");
    apb_write(20'h0C, 32'hA5);
    apb_write(20'h10, 1);
    #1 chk(!irq, "flag cleared");
    finish_tb();
  end
endmodule
