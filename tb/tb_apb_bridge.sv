`timescale 1ns/1ps
// tb_apb_bridge: the bridge against a register-file peripheral model that
// runs on the gated peripheral clock (system clock enabled one cycle in 4)
// and inserts wait states. Checks writes and reads arrive intact, that
// peripheral-bus signals change only at peripheral-clock edges, and the
// two-phase protocol (setup before access).
module tb_apb_bridge;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "sbus_tasks.svh"
  `TB_WATCHDOG(clk, 50000)

  sbus_req_t sreq = '0;
  sbus_rsp_t srsp;
  apb_req_t  preq, preq_q;
  apb_rsp_t  prsp;
  logic [1:0] div = 0;
  logic tick = 0;
  logic pclk;
  logic en_l;

  always_ff @(posedge clk) begin
    div  <= div + 1'b1;
    tick <= (div == 2'd3);
  end
  always_latch if (!clk) en_l = tick;
  assign pclk = clk & en_l;

  apb_bridge dut (.clk, .rst_n, .peri_tick(tick), .s_req(sreq), .s_rsp(srsp),
                  .p_req(preq), .p_rsp(prsp));

  // peripheral model: 16 registers, one wait state on odd addresses
  logic [31:0] regs [16];
  logic        waited;
  int          bad_phase = 0, setups = 0;
  always @(posedge pclk) begin
    if (preq.psel && !preq.penable) setups++;
    if (preq.penable && !preq_q.psel) bad_phase++;
    preq_q <= preq;
    if (preq.psel && preq.penable) begin
      if (prsp.pready) begin
        if (preq.pwrite) regs[preq.paddr[5:2]] <= preq.pwdata;
        waited <= 1'b0;
      end else waited <= 1'b1;
    end
  end
  assign prsp.pready = !preq.paddr[2] || waited;
  assign prsp.prdata = regs[preq.paddr[5:2]];

  // peripheral-bus outputs may only change right after a peripheral edge
  int bad_change = 0;
  apb_req_t last;
  always @(posedge clk) begin
    #1;
    if (preq != last && !tick_prev) bad_change++;
    last = preq;
  end
  logic tick_prev;
  always @(posedge clk) tick_prev <= tick;

  initial begin
    logic [31:0] ref_r [16];
    logic [31:0] q;
    preq_q = '0; waited = 0; last = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ref_r[i] = $urandom;
      sb_write(32'h4000_0000 + 32'(4*i), ref_r[i]);
    end
    for (int i = 15; i >= 0; i--) begin
      sb_read(32'h4000_0000 + 32'(4*i), q);
      chk(q == ref_r[i], $sformatf("reg %0d: %h expected %h", i, q, ref_r[i]));
    end
    chk(setups == 32, $sformatf("%0d setup phases", setups));
    chk(bad_phase == 0, "access without setup");
    chk(bad_change == 0, $sformatf("%0d changes off a peripheral edge", bad_change));
    finish_tb();
  end
endmodule
