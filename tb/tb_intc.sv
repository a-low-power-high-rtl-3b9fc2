`timescale 1ns/1ps
// tb_intc: random sources, enables and priorities; after each change the
// reported identity is compared with a reference selection (highest
// priority, lowest line on a tie) computed here, and irq/wake with "any
// pending". Also checks the two-cycle latency.
module tb_intc;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "sbus_tasks.svh"
  `TB_WATCHDOG(clk, 50000)

  sbus_req_t sreq = '0;
  sbus_rsp_t srsp;
  logic [31:0] src = 0;
  logic irq, wake;
  logic [4:0] irq_id;

  intc dut (.clk, .rst_n, .src, .req(sreq), .rsp(srsp), .irq, .wake, .irq_id);

  logic [31:0] en_m;
  logic [3:0]  pr_m [32];

  initial begin
    logic [31:0] q;
    int best, lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    en_m = 32'hFFFF_FFFF;
    sb_write(32'h3000_1004, en_m);
    for (int i = 0; i < 32; i++) begin
      pr_m[i] = 4'($urandom);
      sb_write(32'h3000_1080 + 32'(4*i), 32'(pr_m[i]));
    end
    sb_read(32'h3000_1080 + 32'(4*7), q);
    chk(q == 32'(pr_m[7]), "priority read back");
    // latency
    @(negedge clk) src = 32'h0000_0100;
    lat = 0;
    while (!irq) begin @(negedge clk); lat++; end
    chk(lat == 2 && irq_id == 8, $sformatf("latency %0d id %0d", lat, irq_id));
    for (int n = 0; n < 200; n++) begin
      if (n % 10 == 0) begin
        en_m = $urandom;
        sb_write(32'h3000_1004, en_m);
      end
      @(negedge clk) src = $urandom & $urandom;
      repeat (3) @(negedge clk);
      best = -1;
      for (int i = 0; i < 32; i++)
        if (src[i] && en_m[i] && (best < 0 || pr_m[i] > pr_m[best])) best = i;
      chk(irq == (best >= 0) && wake == irq, "irq = any pending");
      if (best >= 0) chk(irq_id == 5'(best), $sformatf("id %0d expected %0d", irq_id, best));
      sb_read(32'h3000_1008, q);
      chk(q[31] == (best >= 0) && (best < 0 || q[4:0] == 5'(best)), "ID register");
    end
    finish_tb();
  end
endmodule
