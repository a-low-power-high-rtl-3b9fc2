`timescale 1ns/1ps
// icg: clock gating cell.
//
// A latch that is transparent while the clock is low holds the enable during
// the high phase, and an AND gate passes the clock only when the held enable
// is 1, so the gated clock never glitches or gets clipped. This is the cell
// of the platform's clock-gating figure (latch with inverted clock input
// followed by an AND gate), one per peripheral, each enable coming from one
// bit of the PMU's 32-bit clock gating configuration register. The latch is
// intended: it is the cell's function.
module icg (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;
  always_latch begin
    if (!clk) en_l = en;
  end
  assign gclk = clk & en_l;
endmodule
