`timescale 1ns/1ps
// wdt: watchdog timer on the peripheral bus.
//
// When enabled the 32-bit counter counts down from LOAD once per clock.
// Software must feed it, by writing the key 0x0000_00A5 to FEED, which
// reloads the counter. If it reaches zero the watchdog sets its flag,
// raises irq and, when reset is enabled, asserts rst_req to the reset
// controller, which resets the system (including this watchdog).
// Registers (APB, no wait states):
//   0x00 LOAD  r/w; a write also loads the counter
//   0x04 VALUE r
//   0x08 CTRL  r/w: [0] enable, [1] reset enable
//   0x0C FEED  w: key 0xA5 reloads the counter
//   0x10 FLAG  r: [0] expired; w: 1 clears it
// The platform lists a watchdog; its behaviour here (key, reset request) is
// this design's.
module wdt
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  output logic     irq,
  output logic     rst_req
);
  localparam logic [31:0] KEY = 32'h0000_00A5;
  logic [31:0] load, value;
  logic [1:0]  ctrl;
  logic        flag;
  logic        wr;

  assign wr = req.psel && req.penable && req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load <= '1; value <= '1; ctrl <= '0; flag <= 1'b0;
    end else begin
      if (ctrl[0]) begin
        if (value == '0) flag <= 1'b1;
        else             value <= value - 1'b1;
      end
      if (wr) begin
        unique case (req.paddr[7:0])
          8'h00: begin load <= req.pwdata; value <= req.pwdata; end
          8'h08: ctrl <= req.pwdata[1:0];
          8'h0C: if (req.pwdata == KEY) value <= load;
          8'h10: if (req.pwdata[0]) flag <= 1'b0;
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
      8'h08:   rsp.prdata = {30'd0, ctrl};
      8'h10:   rsp.prdata = {31'd0, flag};
      default: rsp.prdata = '0;
    endcase
  end

  assign irq     = flag;
  assign rst_req = flag && ctrl[1];
endmodule
