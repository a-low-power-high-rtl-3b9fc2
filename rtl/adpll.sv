`timescale 1ns/1ps
// adpll: behavioural model of the programmable all-digital PLL.
//
// This is a simulation model, not synthesizable logic: the real part is a
// digitally controlled oscillator with a time-to-digital loop. It measures
// the reference period (25 MHz crystal), and after LOCK_CYCLES reference
// edges with an unchanged setting it raises lock and runs clk_out at
// f_ref * mult / div. Changing mult or div drops lock until it re-locks.
// The platform gives the 25 MHz reference and an output range of 100 kHz
// to 1 GHz; the mult/div programming interface and the lock time are this
// model's own choices (200 MHz = 25 MHz * 8 / 1).
module adpll #(
  parameter int unsigned LOCK_CYCLES = 32
) (
  input  logic       ref_clk,
  input  logic       rst_n,
  input  logic [7:0] mult,
  input  logic [7:0] div,
  output logic       clk_out,
  output logic       lock
);
  realtime t_last;
  realtime t_ref;
  realtime half;
  int unsigned lock_cnt;
  logic [15:0] cfg_q;

  initial begin
    t_last   = 0;
    t_ref    = 0;
    half     = 0;
    lock     = 1'b0;
    lock_cnt = 0;
    cfg_q    = '0;
    clk_out  = 1'b0;
  end

  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      lock     <= 1'b0;
      lock_cnt = 0;
    end else begin
      if (t_last > 0) t_ref = $realtime - t_last;
      t_last = $realtime;
      if ({mult, div} != cfg_q || mult == 0 || div == 0) begin
        cfg_q    = {mult, div};
        lock_cnt = 0;
        lock    <= 1'b0;
      end else if (lock_cnt < LOCK_CYCLES) begin
        lock_cnt = lock_cnt + 1;
        if (t_ref > 0) half = t_ref * real'(div) / (2.0 * real'(mult));
      end else begin
        lock <= 1'b1;
      end
    end
  end

  initial begin
    forever begin
      if (half > 0) begin
        #(half);
        clk_out = ~clk_out;
      end else begin
        @(posedge ref_clk);
      end
    end
  end
endmodule
