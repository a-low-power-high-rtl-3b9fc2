`timescale 1ns/1ps
// tb_spi_master: a mode-0 slave model (samples MOSI on rising SCK, shifts
// MISO out on falling SCK) exchanges random bytes with the master. Checks
// both directions, SCK count and period, chip select and the interrupt.
module tb_spi_master;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 50000)

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic sck, mosi, miso, cs_n, irq;

  spi_master dut (.clk, .rst_n, .req, .rsp, .sck, .mosi, .miso, .cs_n, .irq);

  logic [7:0] s_rx, s_tx;
  int nsck;
  always @(posedge sck) begin s_rx = {s_rx[6:0], mosi}; nsck++; end
  always @(negedge sck) s_tx = {s_tx[6:0], 1'b0};
  assign miso = s_tx[7];

  initial begin
    logic [31:0] q;
    int t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_write(20'h08, 2);          // half period 3 clocks
    apb_write(20'h10, 1);
    apb_write(20'h0C, 0);
    chk(cs_n == 0, "chip select asserted");
    for (int n = 0; n < 8; n++) begin
      logic [7:0] m = 8'($urandom), s = 8'($urandom);
      s_tx = s; nsck = 0;
      apb_write(20'h00, 32'(m));
      t = 0;
      while (!irq) begin @(posedge clk); t++; end
      chk(nsck == 8, $sformatf("%0d SCK pulses", nsck));
      chk(t >= 44 && t <= 50, $sformatf("transfer took %0d clocks", t));
      chk(s_rx == m, $sformatf("slave got %h expected %h", s_rx, m));
      apb_read(20'h00, q);
      chk(q[7:0] == s, $sformatf("master got %h expected %h", q[7:0], s));
      apb_write(20'h04, 2);
      #1 chk(!irq, "done cleared");
    end
    apb_write(20'h0C, 1);
    chk(cs_n == 1, "chip select released");
    finish_tb();
  end
endmodule
