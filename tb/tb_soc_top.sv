`timescale 1ns/1ps
// tb_soc_top: end-to-end run of the whole platform at its default sizes.
// The testbench plays the CPU on the CPU bus port (clocked by the gated CPU
// clock) and models the board: NOR flash, an I2C temperature sensor, a
// Bluetooth module on UART 3, an SPI loop-back, GPIO pins and the ADC
// input. It follows the platform's temperature-sensor application: boot
// from the ADPLL clock, read the boot flash, read the sensor over I2C,
// send the value over the UART, show it on GPIO, then set the sleep timer
// and the clock gating register and go to Snooze until the timer wakes the
// system. It also encrypts a block with the AES DMA, uses Halt with an
// interrupt wake-up, Shut-down with power gating and reboot, the ADC, SPI,
// PWM, a soft reset, an unmapped access and a watchdog reset that
// arrives in Halt and wakes the platform. Each
// mechanism is counted and a failure is recorded for any that never
// happened.
module tb_soc_top;
  import soc_pkg::*;
  logic por_n = 1, ext_clk = 0, xo_clk = 0, clk_sel = 1;
  logic [7:0] pll_mult = 8, pll_div = 1;
  logic cpu_clk, cpu_rst_n, cpu_irq, cpu_pwr_on;
  logic [4:0] cpu_irq_id;
  sbus_req_t sreq = '0;
  sbus_rsp_t srsp;
  logic [1:0] pwr_mode;
  logic [2:0] uart_rx = '1, uart_tx;
  logic [1:0] spi_sck, spi_mosi, spi_miso, spi_cs_n;
  logic [1:0] i2c_scl_i, i2c_sda_i, i2c_scl_oe, i2c_sda_oe;
  logic [1:0][7:0] gpio_i = '0, gpio_o, gpio_oe;
  logic pwm_o;
  logic [15:0] adc_vin = 16'h9C40;
  logic [14:0] nor_addr;
  logic [15:0] nor_dq;
  logic nor_ce_n, nor_oe_n, nor_we_n;
  logic clk;

  always #2.5 ext_clk = ~ext_clk;
  always #20 xo_clk = ~xo_clk;
  assign clk = cpu_clk;
  `include "tb_common.svh"
  `include "sbus_tasks.svh"
  `TB_WATCHDOG(xo_clk, 100000)

  soc_top dut (.*, .cpu_req(sreq), .cpu_rsp(srsp));

  // ---------------- board models
  function automatic logic [15:0] flash(input logic [14:0] a);
    return 16'(a) * 16'd12345 + 16'h0B00;
  endfunction
  assign nor_dq = (!nor_ce_n && !nor_oe_n) ? flash(nor_addr) : 16'hFFFF;

  assign spi_miso = spi_mosi;          // loop-back on both SPI ports

  // I2C temperature sensor at address 0x48 on I2C 1, returns 0x1A 0xC5
  logic scl, sda, s_oe = 0;
  assign scl = !i2c_scl_oe[0];
  assign sda = !(i2c_sda_oe[0] || s_oe);
  assign i2c_scl_i = {1'b1, scl};
  assign i2c_sda_i = {1'b1, sda};
  typedef enum {S_IDLE, S_ADDR, S_WR, S_RD, S_IGN} sst_e;
  sst_e st = S_IDLE;
  int bitcnt = 0, rbit = 0;
  logic [7:0] sh, txb;
  logic [7:0] rd_data [2] = '{8'h1A, 8'hC5};
  int rd_idx = 0;
  logic m_ack;
  always @(negedge sda) if (scl) begin st = S_ADDR; bitcnt = 0; s_oe = 0; end
  always @(posedge sda) if (scl) st = S_IDLE;
  always @(posedge scl) begin
    if ((st == S_ADDR || st == S_WR) && bitcnt < 8) begin sh = {sh[6:0], sda}; bitcnt++; end
    if (st == S_RD && rbit == 9) m_ack = !sda;
  end
  always @(negedge scl) begin
    if (st == S_ADDR || st == S_WR) begin
      if (bitcnt == 8) begin
        if (st == S_WR || sh[7:1] == 7'h48) s_oe = 1;
        bitcnt = 9;
      end else if (bitcnt == 9) begin
        s_oe = 0; bitcnt = 0;
        if (st == S_ADDR) begin
          if (sh[7:1] != 7'h48) st = S_IGN;
          else if (sh[0]) begin st = S_RD; txb = rd_data[0]; rd_idx = 1; s_oe = !txb[7]; rbit = 1; end
          else st = S_WR;
        end
      end
    end else if (st == S_RD) begin
      if (rbit < 8)       begin s_oe = !txb[7 - rbit]; rbit++; end
      else if (rbit == 8) begin s_oe = 0; rbit = 9; end
      else if (m_ack)     begin txb = rd_data[rd_idx % 2]; rd_idx++; s_oe = !txb[7]; rbit = 1; end
      else begin s_oe = 0; st = S_IGN; end
    end
  end

  // Bluetooth module: decode UART 3 frames (8 peripheral clocks per bit)
  logic [7:0] bt_rx [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_tx[2]);
      #80;
      for (int i = 0; i < 8; i++) begin #160; b[i] = uart_tx[2]; end
      #160;
      bt_rx.push_back(b);
    end
  end

  // ---------------- mechanism counters
  int n_arb_conflict = 0, n_bridge_wait = 0, n_gated_uart_edges = 0, n_uart_edges = 0;
  int n_halt = 0, n_snooze = 0, n_shutdown = 0, n_pwr_off = 0, n_err = 0, n_wdt_rst = 0;
  int n_dma_blocks = 0, n_soft_rst = 0, n_irq = 0, n_lock_wait = 0;
  logic in_low_power;
  always @(posedge dut.sys_clk) begin
    if (dut.m_req[0].valid && dut.m_req[1].valid) n_arb_conflict++;
    if (dut.pb_req.penable && !dut.pb_rsp.pready && dut.peri_tick) n_bridge_wait++;
    if (cpu_irq) n_irq++;
  end
  always @(posedge dut.pclk[P_UART0]) begin
    n_uart_edges++;
    if (in_low_power) n_gated_uart_edges++;
  end
  always @(negedge cpu_pwr_on) n_pwr_off++;
  // a system reset that arrives in a low-power mode must bring it back
  logic [1:0] mode_q = '0;
  int n_reset_wake = 0;
  always @(posedge xo_clk) mode_q <= pwr_mode;
  always @(negedge dut.sys_rst_n) if (mode_q != 2'd0) n_reset_wake++;
  always @(posedge dut.u_sec.aes_done) n_dma_blocks++;
  always @(negedge dut.peri_rst_n[P_UART0]) if (dut.sys_rst_n) n_soft_rst++;
  int cpu_edges_low_power = 0;
  always @(posedge cpu_clk) if (pwr_mode != 2'd0) cpu_edges_low_power++;

  localparam logic [31:0] SEC = 32'h2000_0000, RSTC = 32'h3000_0000, INTC = 32'h3000_1000,
                          PMU = 32'h3000_2000;
  function automatic logic [31:0] P(input int idx, input int off);
    return 32'h4000_0000 + 32'(idx << 16) + 32'(off);
  endfunction

  task automatic wait_boot();
    wait (!cpu_rst_n);
    wait (cpu_rst_n);
    repeat (4) @(posedge cpu_clk);
  endtask

  task automatic i2c_cmd(input logic [4:0] c);
    logic [31:0] q;
    sb_write(P(P_I2C0, 8'h00), 32'(c));
    do sb_read(P(P_I2C0, 8'h0C), q); while (q[0]);
  endtask

  initial begin
    logic [31:0] q, d;
    logic e;
    int t0;
    in_low_power = 0;
    #1 por_n = 0;
    #200 por_n = 1;
    // ---- boot on the ADPLL clock: reset waits for lock
    wait (dut.sys_rst_n);
    chk(dut.pll_lock, "system reset released only after ADPLL lock");
    n_lock_wait++;
    wait (cpu_rst_n);
    repeat (4) @(posedge cpu_clk);
    // ---- boot code from NOR flash
    for (int i = 0; i < 4; i++) begin
      sb_read(P(P_NOR, 4*i), q);
      chk(q == {flash(15'(2*i+1)), flash(15'(2*i))}, $sformatf("boot word %0d %h", i, q));
      sb_write(32'h0000_0000 + 32'(4*i), q);
    end
    sb_read(32'h0000_0008, q);
    chk(q == {flash(15'd5), flash(15'd4)}, "boot code copied to main memory");
    sb_write(32'h1000_3FFC, 32'hCAFE_F00D);
    sb_read(32'h1000_3FFC, q);
    chk(q == 32'hCAFE_F00D, "SRAM buffer last word");
    sb_access(1'b0, 32'h5000_0000, 0, 4'hF, q, e);
    chk(e, "unmapped address answered with error");
    if (e) n_err++;
    // ---- interrupt controller: timer (1), sleep timer (0), security (16)
    sb_write(INTC + 32'h004, 32'h0001_0003);
    sb_write(INTC + 32'h084, 5);
    sb_write(INTC + 32'h080, 7);
    // ---- temperature sensor over I2C
    sb_write(P(P_I2C0, 8'h10), 3);
    sb_write(P(P_I2C0, 8'h04), {7'h48, 1'b0});
    i2c_cmd(5'b00101);
    sb_write(P(P_I2C0, 8'h04), 8'h00);
    i2c_cmd(5'b00100);
    sb_write(P(P_I2C0, 8'h04), {7'h48, 1'b1});
    i2c_cmd(5'b00101);
    i2c_cmd(5'b01000);
    sb_read(P(P_I2C0, 8'h08), d);
    i2c_cmd(5'b11010);
    sb_read(P(P_I2C0, 8'h08), q);
    chk(d[7:0] == 8'h1A && q[7:0] == 8'hC5, $sformatf("temperature bytes %h %h", d[7:0], q[7:0]));
    // ---- send it over Bluetooth (UART 3), show it on GPIO 1
    sb_write(P(P_UART2, 8'h08), 8);
    sb_write(P(P_UART2, 8'h00), {24'd0, d[7:0]});
    sb_write(P(P_GPIO0, 8'h04), 8'hFF);
    sb_write(P(P_GPIO0, 8'h00), {24'd0, d[7:0]});
    chk(gpio_oe[0] == 8'hFF && gpio_o[0] == 8'h1A, "LCD data on GPIO");
    do sb_read(P(P_UART2, 8'h04), q); while (q[0]);
    #400;
    chk(bt_rx.size() == 1 && bt_rx[0] == 8'h1A, "Bluetooth module received the measurement");
    // ---- ADC, SPI, PWM
    sb_write(P(P_ADC, 8'h00), 1);
    do sb_read(P(P_ADC, 8'h04), q); while (!q[1]);
    sb_read(P(P_ADC, 8'h08), q);
    chk(q == 32'(adc_vin >> 4), $sformatf("ADC code %h", q));
    sb_write(P(P_SPI0, 8'h0C), 0);
    sb_write(P(P_SPI0, 8'h00), 8'h96);
    do sb_read(P(P_SPI0, 8'h04), q); while (!q[1]);
    sb_read(P(P_SPI0, 8'h00), q);
    chk(q == 32'h96 && spi_cs_n[0] == 0, "SPI loop-back byte");
    sb_write(P(P_PWM, 8'h00), 10);
    sb_write(P(P_PWM, 8'h04), 3);
    sb_write(P(P_PWM, 8'h08), 1);
    begin
      int hi = 0;
      repeat (50) @(posedge dut.pclk[P_PWM]);
      repeat (100) begin @(negedge dut.pclk[P_PWM]); hi += pwm_o; end
      chk(hi == 30, $sformatf("PWM high %0d of 100", hi));
    end
    // ---- AES through the security DMA, CPU polling meanwhile
    for (int w = 0; w < 4; w++) sb_write(32'h0000_0100 + 32'(4*w), 32'h00112233 + 32'h44444444 * 32'(w));
    for (int w = 0; w < 4; w++) sb_write(SEC + 32'h20 + 32'(4*w), 32'h00010203 + 32'h04040404 * 32'(w));
    sb_write(SEC + 32'h00, 0);
    sb_write(SEC + 32'h04, 2);
    do sb_read(SEC + 32'h08, q); while (!q[2]);
    sb_write(SEC + 32'h0C, 32'h100);
    sb_write(SEC + 32'h10, 32'h1000_0000);
    sb_write(SEC + 32'h14, 1);
    sb_write(SEC + 32'h18, 1);
    sb_write(SEC + 32'h04, 1);
    do sb_read(SEC + 32'h08, q); while (!q[1]);
    begin
      logic [127:0] c;
      for (int w = 0; w < 4; w++) begin sb_read(32'h1000_0000 + 32'(4*w), q); c[127 - 32*w -: 32] = q; end
      chk(c == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("AES ciphertext %h", c));
    end
    sb_read(INTC + 32'h008, q);
    chk(q[31] && q[4:0] == 16, "security interrupt pending");
    sb_write(SEC + 32'h08, 2);
    // ---- soft reset of UART 1
    sb_write(P(P_UART0, 8'h08), 100);
    sb_write(RSTC + 32'h0, 1 << P_UART0);
    sb_read(P(P_UART0, 8'h08), q);
    chk(q == 434, "soft reset restored UART divider");
    // ---- clock gating register: UART 1 clock off in Active
    sb_write(PMU + 32'h4, ~(32'd1 << P_UART0));
    t0 = n_uart_edges;
    repeat (100) @(posedge cpu_clk);
    chk(n_uart_edges == t0, "UART clock gated by CG_CFG");
    sb_write(PMU + 32'h4, 32'hFFFF_FFFF);
    // ---- Halt, woken by the timer interrupt
    sb_write(P(P_TMR, 8'h00), 200);
    sb_write(P(P_TMR, 8'h08), 3);
    sb_write(PMU, 1);
    #20;
    chk(pwr_mode == 2'd1, "in Halt");
    t0 = cpu_edges_low_power;
    wait (pwr_mode == 2'd0);
    n_halt++;
    sb_read(PMU, q);
    chk(q[5:4] == 2'b01, "woken from Halt by interrupt");
    sb_write(P(P_TMR, 8'h0C), 1);
    // ---- Snooze with the sleep timer, as in the application example
    sb_write(P(P_STMR, 8'h10), 9);          // prescale /10
    sb_write(P(P_STMR, 8'h00), 40);         // 400 peripheral clocks
    sb_write(P(P_STMR, 8'h08), 3);
    sb_write(PMU + 32'h4, 32'h0000_00F0);
    sb_write(PMU, 2);
    in_low_power = 1;
    #20 chk(pwr_mode == 2'd2, "in Snooze");
    t0 = 0;
    while (pwr_mode != 2'd0) begin @(posedge xo_clk); t0++; end
    in_low_power = 0;
    n_snooze++;
    chk(t0 * 40 >= 400 * 20 - 200, $sformatf("snooze lasted %0d ns", t0 * 40));
    sb_read(PMU, q);
    chk(q[5:4] == 2'b10, "woken from Snooze by the sleep timer");
    sb_write(P(P_STMR, 8'h0C), 1);
    sb_write(PMU + 32'h4, 32'hFFFF_FFFF);
    // ---- Shut-down: domain powered off, sleep timer wakes, core reboots
    sb_write(32'h0000_0200, 32'h1234_5678);
    sb_write(P(P_STMR, 8'h00), 30);
    sb_write(P(P_STMR, 8'h08), 3);
    sb_write(PMU, 3);
    #20;
    chk(pwr_mode == 2'd3 && !cpu_pwr_on && !cpu_rst_n, "shut down: power off, CPU in reset");
    wait (cpu_rst_n);
    n_shutdown++;
    repeat (4) @(posedge cpu_clk);
    chk(cpu_pwr_on && pwr_mode == 2'd0, "rebooted after shut-down");
    sb_read(PMU, q);
    chk(q[5:4] == 2'b10, "woken from Shut-down by the sleep timer");
    sb_write(P(P_STMR, 8'h0C), 1);
    sb_write(P(P_STMR, 8'h08), 0);
    // ---- watchdog reset while in Halt: the reset wakes the platform
    sb_write(P(P_WDT, 8'h00), 100);
    sb_write(P(P_WDT, 8'h08), 3);
    sb_write(PMU, 1);
    #20 chk(pwr_mode == 2'd1, "in Halt waiting for the watchdog");
    n_halt++;
    wait_boot();
    chk(pwr_mode == 2'd0 && n_reset_wake == 1, "watchdog reset woke the platform from Halt");
    sb_read(RSTC + 32'h4, q);
    chk(q[1], "reset cause: watchdog");
    if (q[1]) n_wdt_rst++;
    sb_read(P(P_WDT, 8'h08), q);
    chk(q == 0, "watchdog disabled after reset");
    // ---- every mechanism happened
    chk(n_lock_wait > 0, "clock-stable reset wait");
    chk(n_arb_conflict > 0, $sformatf("bus arbitration conflicts: %0d", n_arb_conflict));
    chk(n_bridge_wait > 0, $sformatf("peripheral wait states: %0d", n_bridge_wait));
    chk(n_gated_uart_edges == 0 && n_uart_edges > 0, "peripheral clock gated in Snooze");
    chk(cpu_edges_low_power <= 4, $sformatf("CPU clock edges in low-power modes: %0d", cpu_edges_low_power));
    chk(n_halt == 2 && n_snooze == 1 && n_shutdown == 1, "Halt entered twice, Snooze and Shut-down once each");
    chk(n_pwr_off == 1, "power gating used once");
    chk(n_dma_blocks == 1 && n_soft_rst == 1 && n_err == 1 && n_wdt_rst == 1 && n_irq > 0,
        "DMA block, soft reset, bus error, watchdog reset, interrupt");
    $display("mechanisms: arb=%0d bridge_wait=%0d halt=%0d snooze=%0d shutdown=%0d pwr_off=%0d dma=%0d soft_rst=%0d err=%0d wdt=%0d reset_wake=%0d irq_cycles=%0d",
             n_arb_conflict, n_bridge_wait, n_halt, n_snooze, n_shutdown, n_pwr_off, n_dma_blocks,
             n_soft_rst, n_err, n_wdt_rst, n_reset_wake, n_irq);
    finish_tb();
  end
endmodule
