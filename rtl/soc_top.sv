`timescale 1ns/1ps
// soc_top: low-power IoT SoC platform.
//
// A 32-bit system bus at the system clock (200 MHz) connects the CPU port,
// the 64 KB main memory, the 16 KB SRAM buffer, the security engines with
// their DMA, the system controller (reset and interrupt controllers) and
// the power management unit. A bridge leads to the peripheral bus at a
// quarter of that clock (50 MHz), which carries the sleep timer, a timer, a
// watchdog, three UARTs, two SPI masters, two GPIO ports, two I2C masters,
// the 12-bit SAR ADC, a PWM controller and the NOR flash controller.
// Clocking: the system clock is the external clock or the ADPLL output
// (25 MHz crystal reference). Each peripheral runs on its own gated copy of
// the system clock, enabled once every 4 cycles and by its bit of the PMU's
// clock gating configuration register; the CPU clock is gated by the PMU.
// The always-on units (clock generator, PMU, system controller, sleep timer)
// are never gated.
// Power: the CPU and main memory sit behind header switches that the PMU
// opens in Shut-down; while that domain is off its bus requests are
// isolated (forced idle), main-memory accesses are answered with an error,
// and its reset is held until it has powered up again.
// The ARM926EJ-S core is a licensed part and not included: its bus master
// port, gated clock, reset and IRQ are ports of this module.
// The set of blocks, bus widths and clocks, modes and gating follow the
// platform description; the address map (soc_pkg), bus protocols and the
// pin-level interfaces are this design's.
module soc_top
  import soc_pkg::*;
(
  // clocks and reset
  input  logic             por_n,
  input  logic             ext_clk,
  input  logic             xo_clk,
  input  logic             clk_sel,
  input  logic [7:0]       pll_mult,
  input  logic [7:0]       pll_div,
  // CPU (ARM926EJ-S) connection
  output logic             cpu_clk,
  output logic             cpu_rst_n,
  output logic             cpu_irq,
  output logic [4:0]       cpu_irq_id,
  output logic             cpu_pwr_on,
  input  sbus_req_t        cpu_req,
  output sbus_rsp_t        cpu_rsp,
  output logic [1:0]       pwr_mode,
  // UARTs: 0 microUSB, 1 RS232, 2 Bluetooth
  input  logic [2:0]       uart_rx,
  output logic [2:0]       uart_tx,
  // SPI masters
  output logic [1:0]       spi_sck,
  output logic [1:0]       spi_mosi,
  input  logic [1:0]       spi_miso,
  output logic [1:0]       spi_cs_n,
  // I2C masters (open drain: *_oe = 1 pulls the line low)
  input  logic [1:0]       i2c_scl_i,
  input  logic [1:0]       i2c_sda_i,
  output logic [1:0]       i2c_scl_oe,
  output logic [1:0]       i2c_sda_oe,
  // GPIO ports
  input  logic [1:0][7:0]  gpio_i,
  output logic [1:0][7:0]  gpio_o,
  output logic [1:0][7:0]  gpio_oe,
  // PWM, ADC input
  output logic             pwm_o,
  input  logic [15:0]      adc_vin,
  // NOR flash
  output logic [14:0]      nor_addr,
  input  logic [15:0]      nor_dq,
  output logic             nor_ce_n,
  output logic             nor_oe_n,
  output logic             nor_we_n
);
  // ---------------- clocks and resets
  logic pll_clk, pll_lock, sys_clk, clk_ok, peri_tick;
  logic sys_rst_n, cpu_rst_n_i, wdt_rst_req, cpu_rst_req;
  logic [NPERI-1:0] peri_rst_n, pclk;
  logic cpu_clk_en, pwr_sleep, cpu_iso, vdd_ok;
  logic [31:0] peri_clk_en;
  pmode_e mode;

  adpll u_adpll (.ref_clk(xo_clk), .rst_n(por_n), .mult(pll_mult), .div(pll_div),
                 .clk_out(pll_clk), .lock(pll_lock));

  clk_gen #(.RATIO(4)) u_clkgen (.ext_clk, .pll_clk, .pll_lock, .clk_sel, .rst_n(por_n),
                                 .sys_clk, .clk_ok, .peri_tick);

  icg u_cpu_cg (.clk(sys_clk), .en(cpu_clk_en), .gclk(cpu_clk));

  // Sleep timer: always on, only divided down.
  icg u_stmr_cg (.clk(sys_clk), .en(peri_tick), .gclk(pclk[P_STMR]));
  for (genvar i = 1; i < NPERI; i++) begin : g_pcg
    icg u_cg (.clk(sys_clk), .en(peri_tick && peri_clk_en[i]), .gclk(pclk[i]));
  end

  power_switch u_psw (.sleep(pwr_sleep), .vdd_ok);
  assign cpu_pwr_on = vdd_ok;

  // ---------------- system bus
  sbus_req_t m_req [2];
  sbus_rsp_t m_rsp [2];
  sbus_req_t s_req [NSLV];
  sbus_rsp_t s_rsp [NSLV];
  sbus_rsp_t mem_rsp;

  assign m_req[0] = cpu_iso ? '0 : cpu_req;
  assign cpu_rsp  = m_rsp[0];

  sys_bus #(.NM(2)) u_sbus (.clk(sys_clk), .rst_n(sys_rst_n), .m_req, .m_rsp, .s_req, .s_rsp);

  sram_mem #(.SIZE_BYTES(65536)) u_main_mem (.clk(sys_clk), .rst_n(sys_rst_n),
                                             .req(s_req[S_MEM]), .rsp(mem_rsp));
  assign s_rsp[S_MEM] = cpu_iso ? '{ready: s_req[S_MEM].valid, err: 1'b1, rdata: '0} : mem_rsp;

  sram_mem #(.SIZE_BYTES(16384)) u_buf_mem (.clk(sys_clk), .rst_n(sys_rst_n),
                                            .req(s_req[S_BUF]), .rsp(s_rsp[S_BUF]));

  logic sec_irq;
  sec_engine u_sec (.clk(sys_clk), .rst_n(sys_rst_n), .s_req(s_req[S_SEC]), .s_rsp(s_rsp[S_SEC]),
                    .m_req(m_req[1]), .m_rsp(m_rsp[1]), .irq(sec_irq));

  reset_ctrl u_rstc (.clk(sys_clk), .por_n, .clk_ok, .wdt_rst_req, .cpu_rst_req,
                     .req(s_req[S_RSTC]), .rsp(s_rsp[S_RSTC]),
                     .sys_rst_n, .cpu_rst_n(cpu_rst_n_i), .peri_rst_n);
  assign cpu_rst_n = cpu_rst_n_i;

  logic [31:0] irq_src;
  logic [NPERI-1:0] p_irq;
  logic irq_wake, stimer_exp;
  assign irq_src = {15'd0, sec_irq, 1'b0, p_irq};

  intc u_intc (.clk(sys_clk), .rst_n(sys_rst_n), .src(irq_src),
               .req(s_req[S_INTC]), .rsp(s_rsp[S_INTC]),
               .irq(cpu_irq), .wake(irq_wake), .irq_id(cpu_irq_id));

  pmu u_pmu (.clk(sys_clk), .rst_n(sys_rst_n), .req(s_req[S_PMU]), .rsp(s_rsp[S_PMU]),
             .irq_wake, .stimer_wake(stimer_exp), .vdd_ok, .mode, .cpu_clk_en,
             .peri_clk_en, .pwr_sleep, .cpu_iso, .cpu_rst_req);
  assign pwr_mode = mode;

  // ---------------- peripheral bus
  apb_req_t pb_req;
  apb_rsp_t pb_rsp;
  apb_req_t p_req [NPERI];
  apb_rsp_t p_rsp [NPERI];

  apb_bridge u_bridge (.clk(sys_clk), .rst_n(sys_rst_n), .peri_tick,
                       .s_req(s_req[S_BRIDGE]), .s_rsp(s_rsp[S_BRIDGE]),
                       .p_req(pb_req), .p_rsp(pb_rsp));

  peri_bus #(.NP(NPERI)) u_pbus (.m_req(pb_req), .m_rsp(pb_rsp), .p_req, .p_rsp);

  // ---------------- peripherals
  logic unused_tmr_exp;

  timer u_stimer (.clk(pclk[P_STMR]), .rst_n(peri_rst_n[P_STMR]), .req(p_req[P_STMR]),
                  .rsp(p_rsp[P_STMR]), .irq(p_irq[P_STMR]), .expired(stimer_exp));
  timer u_timer  (.clk(pclk[P_TMR]), .rst_n(peri_rst_n[P_TMR]), .req(p_req[P_TMR]),
                  .rsp(p_rsp[P_TMR]), .irq(p_irq[P_TMR]), .expired(unused_tmr_exp));
  wdt   u_wdt    (.clk(pclk[P_WDT]), .rst_n(peri_rst_n[P_WDT]), .req(p_req[P_WDT]),
                  .rsp(p_rsp[P_WDT]), .irq(p_irq[P_WDT]), .rst_req(wdt_rst_req));

  for (genvar u = 0; u < 3; u++) begin : g_uart
    uart u_uart (.clk(pclk[P_UART0 + u]), .rst_n(peri_rst_n[P_UART0 + u]),
                 .req(p_req[P_UART0 + u]), .rsp(p_rsp[P_UART0 + u]),
                 .rx(uart_rx[u]), .tx(uart_tx[u]), .irq(p_irq[P_UART0 + u]));
  end
  for (genvar s = 0; s < 2; s++) begin : g_spi
    spi_master u_spi (.clk(pclk[P_SPI0 + s]), .rst_n(peri_rst_n[P_SPI0 + s]),
                      .req(p_req[P_SPI0 + s]), .rsp(p_rsp[P_SPI0 + s]),
                      .sck(spi_sck[s]), .mosi(spi_mosi[s]), .miso(spi_miso[s]),
                      .cs_n(spi_cs_n[s]), .irq(p_irq[P_SPI0 + s]));
  end
  for (genvar g = 0; g < 2; g++) begin : g_gpio
    gpio #(.W(8)) u_gpio (.clk(pclk[P_GPIO0 + g]), .rst_n(peri_rst_n[P_GPIO0 + g]),
                          .req(p_req[P_GPIO0 + g]), .rsp(p_rsp[P_GPIO0 + g]),
                          .gpio_i(gpio_i[g]), .gpio_o(gpio_o[g]), .gpio_oe(gpio_oe[g]),
                          .irq(p_irq[P_GPIO0 + g]));
  end
  for (genvar c = 0; c < 2; c++) begin : g_i2c
    i2c_master u_i2c (.clk(pclk[P_I2C0 + c]), .rst_n(peri_rst_n[P_I2C0 + c]),
                      .req(p_req[P_I2C0 + c]), .rsp(p_rsp[P_I2C0 + c]),
                      .scl_i(i2c_scl_i[c]), .sda_i(i2c_sda_i[c]),
                      .scl_oe(i2c_scl_oe[c]), .sda_oe(i2c_sda_oe[c]), .irq(p_irq[P_I2C0 + c]));
  end

  logic        adc_sample, adc_cmp;
  logic [11:0] adc_dac;
  adc_sar #(.NBITS(12)) u_adc (.clk(pclk[P_ADC]), .rst_n(peri_rst_n[P_ADC]), .req(p_req[P_ADC]),
                               .rsp(p_rsp[P_ADC]), .sample(adc_sample), .dac_code(adc_dac),
                               .cmp(adc_cmp), .irq(p_irq[P_ADC]));
  adc_afe u_adc_afe (.sample(adc_sample), .vin_frac(adc_vin), .dac_code(adc_dac), .cmp(adc_cmp));

  pwm u_pwm (.clk(pclk[P_PWM]), .rst_n(peri_rst_n[P_PWM]), .req(p_req[P_PWM]),
             .rsp(p_rsp[P_PWM]), .pwm_o);
  assign p_irq[P_PWM] = 1'b0;

  nor_ctrl #(.AW(15)) u_nor (.clk(pclk[P_NOR]), .rst_n(peri_rst_n[P_NOR]), .req(p_req[P_NOR]),
                             .rsp(p_rsp[P_NOR]), .nor_addr, .nor_dq, .nor_ce_n, .nor_oe_n, .nor_we_n);
  assign p_irq[P_NOR] = 1'b0;
endmodule
