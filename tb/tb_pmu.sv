`timescale 1ns/1ps
// tb_pmu: walks the mode diagram. Checks each software entry (Active to
// Halt, Snooze, Shut-down; Halt to Snooze; Snooze to Shut-down), that
// entries the diagram does not have are refused, the wake-up sources of
// each mode (interrupt: Halt and Snooze; sleep timer: Snooze and
// Shut-down), the clock enables of each mode and the power-up sequence.
module tb_pmu;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "sbus_tasks.svh"
  `TB_WATCHDOG(clk, 20000)

  sbus_req_t sreq = '0;
  sbus_rsp_t srsp;
  logic irq_wake = 0, stimer_wake = 0, vdd_ok;
  pmode_e mode;
  logic cpu_clk_en, pwr_sleep, cpu_iso, cpu_rst_req;
  logic [31:0] peri_clk_en;

  pmu #(.PWRUP_CYCLES(5)) dut (.clk, .rst_n, .req(sreq), .rsp(srsp), .irq_wake, .stimer_wake,
    .vdd_ok, .mode, .cpu_clk_en, .peri_clk_en, .pwr_sleep, .cpu_iso, .cpu_rst_req);
  power_switch #(.RAMP_NS(40)) u_sw (.sleep(pwr_sleep), .vdd_ok);

  localparam logic [31:0] MODE = 32'h3000_2000, CG = 32'h3000_2004;

  task automatic expect_mode(input pmode_e m, input string what);
    @(negedge clk);
    chk(mode == m, $sformatf("%s: mode %s expected %s", what, mode.name(), m.name()));
  endtask

  initial begin
    logic [31:0] q;
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_mode(M_ACTIVE, "after reset");
    chk(cpu_clk_en && peri_clk_en == '1 && !pwr_sleep, "active enables");
    sb_write(CG, 32'h0000_00F0);
    sb_read(CG, q);
    chk(q == 32'hF0, "CG_CFG read back");
    chk(peri_clk_en == 32'hF0, "peripheral clocks follow CG_CFG in Active");
    // Active -> Halt -> (interrupt) Active
    sb_write(MODE, 1);
    expect_mode(M_HALT, "halt");
    chk(!cpu_clk_en && peri_clk_en == 32'hF0, "halt: CPU clock off, peripherals on");
    stimer_wake = 1; repeat (3) @(posedge clk);
    expect_mode(M_HALT, "sleep timer alone does not end halt");
    stimer_wake = 0;
    sb_write(MODE, 3);
    expect_mode(M_HALT, "halt to shut-down refused");
    irq_wake = 1; @(posedge clk); #1 irq_wake = 0;
    expect_mode(M_ACTIVE, "interrupt wakes halt");
    sb_read(MODE, q);
    chk(q[5:4] == 2'b01, "wake cause interrupt");
    // Active -> Halt -> Snooze -> (sleep timer) Active
    sb_write(MODE, 1);
    sb_write(MODE, 2);
    expect_mode(M_SNOOZE, "halt to snooze");
    chk(!cpu_clk_en && peri_clk_en == 0 && !pwr_sleep, "snooze enables");
    stimer_wake = 1; @(posedge clk); #1 stimer_wake = 0;
    expect_mode(M_ACTIVE, "sleep timer wakes snooze");
    // Active -> Snooze -> (interrupt) Active
    sb_write(MODE, 2);
    expect_mode(M_SNOOZE, "active to snooze");
    sb_write(MODE, 1);
    expect_mode(M_SNOOZE, "snooze to halt refused");
    irq_wake = 1; @(posedge clk); #1 irq_wake = 0;
    expect_mode(M_ACTIVE, "interrupt wakes snooze");
    // Active -> Snooze -> Shut-down -> (sleep timer) Active
    sb_write(MODE, 2);
    sb_write(MODE, 3);
    expect_mode(M_SHUTDOWN, "snooze to shut-down");
    chk(pwr_sleep && cpu_iso && cpu_rst_req && !cpu_clk_en, "shut-down: domain off");
    irq_wake = 1; repeat (4) @(posedge clk); #1 irq_wake = 0;
    expect_mode(M_SHUTDOWN, "interrupt does not end shut-down");
    stimer_wake = 1; @(posedge clk); #1 stimer_wake = 0;
    t0 = 0;
    @(negedge clk);
    chk(!pwr_sleep && cpu_iso, "power-up: switches closed, still isolated");
    while (mode != M_ACTIVE) begin @(negedge clk); t0++; end
    chk(t0 >= 4 + 5, $sformatf("power-up took %0d cycles", t0));
    chk(!cpu_iso && !cpu_rst_req && cpu_clk_en, "back in active");
    // Active -> Shut-down directly, then system reset returns to Active
    sb_write(MODE, 3);
    expect_mode(M_SHUTDOWN, "active to shut-down");
    rst_n = 0; #1;
    chk(mode == M_ACTIVE, "reset wakes");
    finish_tb();
  end
endmodule
