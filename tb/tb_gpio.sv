`timescale 1ns/1ps
// tb_gpio: output data and direction, synchronised input read-back, and the
// rising-edge interrupt with its enable and clear.
module tb_gpio;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 20000)

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic [7:0] gpio_i = 0, gpio_o, gpio_oe;
  logic irq;

  gpio #(.W(8)) dut (.clk, .rst_n, .req, .rsp, .gpio_i, .gpio_o, .gpio_oe, .irq);

  initial begin
    logic [31:0] q;
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(gpio_oe == 0, "inputs after reset");
    apb_write(20'h04, 8'hF0);
    apb_write(20'h00, 8'hA5);
    chk(gpio_oe == 8'hF0 && gpio_o == 8'hA5, "direction and output");
    for (int n = 0; n < 10; n++) begin
      logic [7:0] v = 8'($urandom);
      gpio_i = v;
      repeat (3) @(posedge clk);
      apb_read(20'h08, q);
      chk(q[7:0] == v, "input read back");
    end
    gpio_i = 0;
    apb_write(20'h10, 8'hFF);
    apb_write(20'h0C, 8'h0F);
    repeat (3) @(posedge clk);
    chk(!irq, "no interrupt yet");
    gpio_i = 8'h12;             // rising on pin 1 (enabled) and pin 4 (disabled)
    repeat (4) @(posedge clk);
    chk(irq, "edge interrupt");
    apb_read(20'h10, q);
    chk(q[7:0] == 8'h02, $sformatf("INTSTAT %h", q[7:0]));
    apb_write(20'h10, 8'h02);
    #1 chk(!irq, "cleared");
    gpio_i = 8'h00; repeat (4) @(posedge clk);
    chk(!irq, "falling edge ignored");
    finish_tb();
  end
endmodule
