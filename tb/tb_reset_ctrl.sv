`timescale 1ns/1ps
// tb_reset_ctrl: checks that the system reset waits for a stable clock and
// is released HOLD_CYCLES later, that a watchdog request resets the system
// and is recorded, the CPU-domain reset request from the PMU, and the
// per-peripheral soft reset.
module tb_reset_ctrl;
  import soc_pkg::*;
  logic clk = 0, por_n = 1, clk_ok = 0, wdt_rst_req = 0, cpu_rst_req = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "sbus_tasks.svh"
  `TB_WATCHDOG(clk, 5000)

  sbus_req_t sreq = '0;
  sbus_rsp_t srsp;
  logic sys_rst_n, cpu_rst_n;
  logic [NPERI-1:0] peri_rst_n;
  int rel;

  reset_ctrl #(.HOLD_CYCLES(8)) dut (.clk, .por_n, .clk_ok, .wdt_rst_req, .cpu_rst_req,
    .req(sreq), .rsp(srsp), .sys_rst_n, .cpu_rst_n, .peri_rst_n);

  int soft_seen [NPERI];
  for (genvar i = 0; i < NPERI; i++) begin : g_m
    always @(negedge peri_rst_n[i]) if (por_n && sys_rst_n) soft_seen[i]++;
  end

  initial begin
    logic [31:0] q;
    foreach (soft_seen[i]) soft_seen[i] = 0;
    #1 por_n = 0;
    #1 chk(!sys_rst_n && !cpu_rst_n && peri_rst_n == 0, "all in reset");
    #30 por_n = 1;
    repeat (20) @(posedge clk);
    chk(!sys_rst_n, "held while clock not stable");
    @(negedge clk) clk_ok = 1;
    rel = 0;
    while (!sys_rst_n) begin @(negedge clk); rel++; end
    chk(rel >= 8 && rel <= 12, $sformatf("released %0d cycles after clock ok", rel));
    @(negedge clk);
    chk(cpu_rst_n && peri_rst_n == '1, "CPU and peripherals out of reset");
    sb_read(32'h3000_0004, q);
    chk(q[1:0] == 2'b01, "cause: power-on");
    sb_write(32'h3000_0004, 1);
    // soft reset of peripherals 3 and 9
    sb_write(32'h3000_0000, (1 << 3) | (1 << 9));
    repeat (2) @(negedge clk);
    chk(soft_seen[3] == 1 && soft_seen[9] == 1 && soft_seen[4] == 0, "soft resets pulsed");
    chk(peri_rst_n == '1 && sys_rst_n, "soft reset released, system untouched");
    // CPU domain reset request
    cpu_rst_req = 1; repeat (2) @(negedge clk);
    chk(!cpu_rst_n && sys_rst_n, "CPU held in reset");
    cpu_rst_req = 0; repeat (2) @(negedge clk);
    chk(cpu_rst_n, "CPU released");
    // watchdog
    wdt_rst_req = 1; @(negedge clk); @(negedge clk);
    chk(!sys_rst_n && peri_rst_n == 0, "watchdog resets the system");
    wdt_rst_req = 0;
    while (!sys_rst_n) @(negedge clk);
    sb_read(32'h3000_0004, q);
    chk(q[1:0] == 2'b10, "cause: watchdog");
    finish_tb();
  end
endmodule
