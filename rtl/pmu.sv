`timescale 1ns/1ps
// pmu: power management unit (always-on, system clock).
//
// Holds the operating mode, Active, Halt, Snooze or Shut-down, and the
// 32-bit clock gating configuration register. Software requests a lower
// mode by writing MODE; the allowed entries are those of the platform's mode
// diagram: Active to any low-power mode, Halt to Snooze, Snooze to
// Shut-down. Wake-up: an interrupt (irq_wake) returns Halt and Snooze to
// Active, the sleep timer (stimer_wake) returns Snooze and Shut-down to
// Active, and a system reset returns every mode to Active.
//   Active    : all clocks run; peripheral i clocked when CG_CFG[i] = 1.
//   Halt      : CPU clock stopped; peripherals as in Active.
//   Snooze    : CPU and peripheral clocks stopped (always-on units run).
//   Shut-down : as Snooze, and the CPU/main-memory domain is powered off
//               (pwr_sleep = 1) with its outputs isolated and its reset
//               held. On wake-up the PMU releases Sleep, waits for vdd_ok
//               and PWRUP_CYCLES more cycles, then releases isolation and
//               reset, so the core boots again.
// Registers (system bus, one-cycle response):
//   0x00 MODE   w: [1:0] requested mode (1 Halt, 2 Snooze, 3 Shut-down)
//               r: [1:0] mode, [4] last wake by interrupt, [5] by sleep timer
//   0x04 CG_CFG clock enable per peripheral, reset value all ones
// Register layout, the meaning of a CG_CFG bit (1 = clock on) and the
// power-up wait are this design's choices.
module pmu
  import soc_pkg::*;
#(
  parameter int unsigned PWRUP_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sbus_req_t   req,
  output sbus_rsp_t   rsp,
  input  logic        irq_wake,
  input  logic        stimer_wake,
  input  logic        vdd_ok,
  output pmode_e      mode,
  output logic        cpu_clk_en,
  output logic [31:0] peri_clk_en,
  output logic        pwr_sleep,
  output logic        cpu_iso,
  output logic        cpu_rst_req
);
  logic [31:0] cg_cfg;
  logic        resp;
  logic [31:0] rdata;
  logic [1:0]  wake_cause;
  logic        powering_up;
  logic [$clog2(PWRUP_CYCLES+1)-1:0] pu_cnt;
  logic        wr, mode_wr;
  pmode_e      req_mode;

  // A MODE write takes effect at the end of its response cycle, so the
  // CPU's clock still delivers the edge that completes the write.
  assign wr       = req.valid && !resp && req.we;
  assign mode_wr  = resp && req.valid && req.we && req.addr[2] == 1'b0;
  assign req_mode = pmode_e'(req.wdata[1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= M_ACTIVE;
      cg_cfg      <= '1;
      resp        <= 1'b0;
      rdata       <= '0;
      wake_cause  <= '0;
      powering_up <= 1'b0;
      pu_cnt      <= '0;
    end else begin
      resp <= req.valid && !resp;
      if (req.valid && !resp && !req.we)
        rdata <= (req.addr[2] == 1'b0) ? {26'd0, wake_cause, 2'd0, mode} : cg_cfg;
      if (wr && req.addr[2] == 1'b1) cg_cfg <= req.wdata;

      unique case (mode)
        M_ACTIVE: begin
          if (mode_wr && req_mode != M_ACTIVE) mode <= req_mode;
        end
        M_HALT: begin
          if (irq_wake) begin
            mode       <= M_ACTIVE;
            wake_cause <= 2'b01;
          end else if (mode_wr && req_mode == M_SNOOZE)
            mode <= M_SNOOZE;
        end
        M_SNOOZE: begin
          if (irq_wake || stimer_wake) begin
            mode       <= M_ACTIVE;
            wake_cause <= {stimer_wake, irq_wake && !stimer_wake};
          end else if (mode_wr && req_mode == M_SHUTDOWN)
            mode <= M_SHUTDOWN;
        end
        M_SHUTDOWN: begin
          if (!powering_up) begin
            if (stimer_wake) begin
              powering_up <= 1'b1;
              pu_cnt      <= '0;
            end
          end else if (vdd_ok) begin
            if (pu_cnt == ($bits(pu_cnt))'(PWRUP_CYCLES)) begin
              powering_up <= 1'b0;
              mode        <= M_ACTIVE;
              wake_cause  <= 2'b10;
            end else begin
              pu_cnt <= pu_cnt + 1'b1;
            end
          end
        end
        default: mode <= M_ACTIVE;
      endcase
    end
  end

  assign cpu_clk_en  = (mode == M_ACTIVE);
  assign peri_clk_en = (mode == M_ACTIVE || mode == M_HALT) ? cg_cfg : '0;
  assign pwr_sleep   = (mode == M_SHUTDOWN) && !powering_up;
  assign cpu_iso     = (mode == M_SHUTDOWN);
  assign cpu_rst_req = (mode == M_SHUTDOWN);

  assign rsp.ready = resp;
  assign rsp.err   = 1'b0;
  assign rsp.rdata = rdata;
endmodule
