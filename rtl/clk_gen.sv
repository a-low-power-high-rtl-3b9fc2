`timescale 1ns/1ps
// clk_gen: digital part of the clock generator.
//
// Picks the system clock: the external clock input (clk_sel = 0) or the
// ADPLL output (clk_sel = 1); clk_sel is meant to be set at power-up and
// held. clk_ok tells the reset controller that the chosen clock is stable
// (always for the external clock, after lock for the ADPLL). It also counts
// system-clock cycles to make peri_tick, high one cycle in RATIO; gating the
// system clock with it gives the peripheral clock, 200/50 = 4 times slower
// by default, with its edges aligned to system-clock edges. The mux and the
// divide-by-RATIO scheme are this design's reading of the platform's
// separate system and peripheral clocks.
module clk_gen #(
  parameter int unsigned RATIO = 4
) (
  input  logic ext_clk,
  input  logic pll_clk,
  input  logic pll_lock,
  input  logic clk_sel,
  input  logic rst_n,       // asynchronous, from the power-on reset pin
  output logic sys_clk,
  output logic clk_ok,
  output logic peri_tick
);
  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1;
  logic [CW-1:0] cnt;

  assign sys_clk = clk_sel ? pll_clk : ext_clk;
  assign clk_ok  = clk_sel ? pll_lock : 1'b1;

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      peri_tick <= 1'b0;
    end else begin
      cnt       <= (cnt == CW'(RATIO - 1)) ? '0 : cnt + 1'b1;
      peri_tick <= (cnt == CW'(RATIO - 1));
    end
  end
endmodule
