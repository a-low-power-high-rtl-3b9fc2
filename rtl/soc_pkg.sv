`timescale 1ns/1ps
// soc_pkg: types and constants shared by the IoT SoC platform.
//
// The system bus is a single-outstanding request/response bus of this design's
// own making: a master holds a request (valid, write, address, data, byte
// enables) stable until the slave answers with a one-cycle ready, which also
// carries the read data. The peripheral bus follows the familiar two-phase
// APB style (setup, then access until pready). Both are 32 bits wide, as in
// the platform description; the address map and the peripheral numbering
// below are this design's choice.
package soc_pkg;

  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  be;
  } sbus_req_t;

  typedef struct packed {
    logic        ready;
    logic        err;
    logic [31:0] rdata;
  } sbus_rsp_t;

  typedef struct packed {
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [19:0] paddr;
    logic [31:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic        pready;
    logic [31:0] prdata;
  } apb_rsp_t;

  // System-bus slaves
  localparam int unsigned NSLV     = 7;
  localparam int unsigned S_MEM    = 0;  // 0x0000_0000 64 KB main memory
  localparam int unsigned S_BUF    = 1;  // 0x1000_0000 16 KB SRAM buffer
  localparam int unsigned S_SEC    = 2;  // 0x2000_0000 security engines
  localparam int unsigned S_RSTC   = 3;  // 0x3000_0000 reset controller
  localparam int unsigned S_INTC   = 4;  // 0x3000_1000 interrupt controller
  localparam int unsigned S_PMU    = 5;  // 0x3000_2000 power management unit
  localparam int unsigned S_BRIDGE = 6;  // 0x4000_0000 peripheral bus (1 MB)

  // Decode a system-bus address; returns NSLV for an unmapped address.
  function automatic int unsigned sbus_decode(input logic [31:0] a);
    unique case (a[31:28])
      4'h0: return S_MEM;
      4'h1: return S_BUF;
      4'h2: return S_SEC;
      4'h3: begin
        if (a[27:14] != '0) return NSLV;
        case (a[13:12])
          2'd0:    return S_RSTC;
          2'd1:    return S_INTC;
          2'd2:    return S_PMU;
          default: return NSLV;
        endcase
      end
      4'h4: return (a[27:20] == '0) ? S_BRIDGE : NSLV;
      default: return NSLV;
    endcase
  endfunction

  // Peripheral slots on the peripheral bus (64 KB each, index = paddr[19:16]).
  // The same index is the peripheral's clock-gate bit, soft-reset bit and
  // interrupt line.
  localparam int unsigned NPERI  = 15;
  localparam int unsigned P_STMR = 0;   // sleep timer (always on)
  localparam int unsigned P_TMR  = 1;
  localparam int unsigned P_WDT  = 2;
  localparam int unsigned P_UART0 = 3;
  localparam int unsigned P_UART1 = 4;
  localparam int unsigned P_UART2 = 5;
  localparam int unsigned P_SPI0 = 6;
  localparam int unsigned P_SPI1 = 7;
  localparam int unsigned P_GPIO0 = 8;
  localparam int unsigned P_GPIO1 = 9;
  localparam int unsigned P_I2C0 = 10;
  localparam int unsigned P_I2C1 = 11;
  localparam int unsigned P_ADC  = 12;
  localparam int unsigned P_PWM  = 13;
  localparam int unsigned P_NOR  = 14;
  localparam int unsigned IRQ_SEC = 16; // security engine / DMA done

  // Power modes (Fig. "Low-power modes")
  typedef enum logic [1:0] {
    M_ACTIVE   = 2'd0,
    M_HALT     = 2'd1,
    M_SNOOZE   = 2'd2,
    M_SHUTDOWN = 2'd3
  } pmode_e;

endpackage
