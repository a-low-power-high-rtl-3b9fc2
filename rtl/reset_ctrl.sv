`timescale 1ns/1ps
// reset_ctrl: reset controller of the system controller (always-on).
//
// The power-on reset pin is synchronised to the system clock. The system
// reset (sys_rst_n) is released HOLD_CYCLES cycles after both the pin is
// released and the clock generator reports a stable clock, so the platform
// starts only on a settled clock. A watchdog reset request restarts that
// hold period. The CPU/main-memory domain reset (cpu_rst_n) is also held
// while the PMU asks for it (shut-down and power-up), so the core boots again
// after shut-down. Each peripheral has its own reset (peri_rst_n), the system
// reset ANDed with a soft reset: writing 1 to a bit of SOFT_RST resets that
// peripheral for one cycle. All reset outputs come from flip-flops: they
// assert asynchronously and release on a clock edge.
// Registers (system bus, one-cycle response; reset by the pin only):
//   0x00 SOFT_RST w: 1 pulses the reset of the peripheral with that index
//   0x04 CAUSE    r: [0] power-on, [1] watchdog; w: 1 clears the bit
// The platform names the initialisation after clock stabilisation and the
// per-peripheral soft reset; register layout and hold time are this design's.
module reset_ctrl
  import soc_pkg::*;
#(
  parameter int unsigned NP          = NPERI,
  parameter int unsigned HOLD_CYCLES = 8
) (
  input  logic          clk,
  input  logic          por_n,
  input  logic          clk_ok,
  input  logic          wdt_rst_req,
  input  logic          cpu_rst_req,
  input  sbus_req_t     req,
  output sbus_rsp_t     rsp,
  output logic          sys_rst_n,
  output logic          cpu_rst_n,
  output logic [NP-1:0] peri_rst_n
);
  logic [1:0]  por_sync;
  logic [$clog2(HOLD_CYCLES+1)-1:0] hold;
  logic [NP-1:0] soft_q;
  logic [1:0]  cause;
  logic        resp;
  logic [31:0] rdata;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) por_sync <= '0;
    else        por_sync <= {por_sync[0], 1'b1};
  end

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      hold       <= '0;
      sys_rst_n  <= 1'b0;
      cpu_rst_n  <= 1'b0;
      peri_rst_n <= '0;
      soft_q       <= '0;
      cause      <= 2'b01;
      resp       <= 1'b0;
      rdata      <= '0;
    end else begin
      resp <= req.valid && !resp;
      soft_q <= '0;
      if (req.valid && !resp) begin
        if (req.we && req.addr[2] == 1'b0) soft_q <= req.wdata[NP-1:0];
        if (req.we && req.addr[2] == 1'b1) cause <= cause & ~req.wdata[1:0];
        if (!req.we) rdata <= req.addr[2] ? {30'd0, cause} : '0;
      end
      if (!por_sync[1] || !clk_ok || (wdt_rst_req && sys_rst_n)) begin
        hold      <= '0;
        sys_rst_n <= 1'b0;
        if (wdt_rst_req && sys_rst_n) cause[1] <= 1'b1;
      end else if (hold != ($bits(hold))'(HOLD_CYCLES)) begin
        hold <= hold + 1'b1;
      end else begin
        sys_rst_n <= 1'b1;
      end
      cpu_rst_n  <= sys_rst_n && !cpu_rst_req;
      peri_rst_n <= {NP{sys_rst_n}} & ~soft_q;
    end
  end

  assign rsp.ready = resp;
  assign rsp.err   = 1'b0;
  assign rsp.rdata = rdata;
endmodule
