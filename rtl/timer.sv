`timescale 1ns/1ps
// timer: 32-bit down-counting timer on the peripheral bus.
//
// The platform has two of these; one is always on and serves as the sleep
// timer that wakes the system from Snooze and Shut-down. When enabled, the
// counter steps down once every PRESCALE+1 clocks; stepping from 0 sets the
// interrupt flag (expired) and either reloads LOAD (periodic mode) or stops
// the timer (one-shot). irq = flag AND interrupt enable. The prescaler lets
// a 50 MHz peripheral clock time long sleeps: LOAD = 0x055DA280 with
// PRESCALE = 999 gives 30 minutes.
// Registers (APB, no wait states):
//   0x00 LOAD      r/w; a write also loads the counter
//   0x04 VALUE     r: current count
//   0x08 CTRL      r/w: [0] count enable, [1] interrupt enable, [2] periodic
//   0x0C INTSTAT   r: [0] flag; w: 1 clears it
//   0x10 PRESCALE  r/w
// The width (32 bits) and the sleep-timer role are the platform's; the
// register layout and the prescaler are this design's.
module timer
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  output logic     irq,
  output logic     expired
);
  logic [31:0] load, value, prescale, pcnt;
  logic [2:0]  ctrl;
  logic        flag;
  logic        wr;
  logic        step;

  assign wr   = req.psel && req.penable && req.pwrite;
  assign step = ctrl[0] && (pcnt == prescale);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load <= '0; value <= '0; prescale <= '0; pcnt <= '0;
      ctrl <= '0; flag <= 1'b0;
    end else begin
      if (ctrl[0]) pcnt <= step ? '0 : pcnt + 1'b1;
      if (step) begin
        if (value == '0) begin
          flag <= 1'b1;
          if (ctrl[2]) value   <= load;
          else         ctrl[0] <= 1'b0;
        end else begin
          value <= value - 1'b1;
        end
      end
      if (wr) begin
        unique case (req.paddr[7:0])
          8'h00: begin load <= req.pwdata; value <= req.pwdata; end
          8'h08: begin ctrl <= req.pwdata[2:0]; pcnt <= '0; end
          8'h0C: if (req.pwdata[0]) flag <= 1'b0;
          8'h10: prescale <= req.pwdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp.pready = 1'b1;
    unique case (req.paddr[7:0])
      8'h00:   rsp.prdata = load;
      8'h04:   rsp.prdata = value;
      8'h08:   rsp.prdata = {29'd0, ctrl};
      8'h0C:   rsp.prdata = {31'd0, flag};
      8'h10:   rsp.prdata = prescale;
      default: rsp.prdata = '0;
    endcase
  end

  assign irq     = flag && ctrl[1];
  assign expired = flag;
endmodule
