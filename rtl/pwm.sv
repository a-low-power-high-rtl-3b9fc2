`timescale 1ns/1ps
// pwm: pulse-width modulation controller on the peripheral bus.
//
// A counter runs from 0 to PERIOD-1 and wraps; the output is high while the
// count is below DUTY (so DUTY = 0 gives a constant low, DUTY >= PERIOD a
// constant high). New PERIOD and DUTY values take effect at the next wrap,
// so a period is never cut short. Output polarity can be inverted.
// Registers (APB, no wait states):
//   0x00 PERIOD r/w (16 bits)   0x04 DUTY r/w (16 bits)
//   0x08 CTRL   r/w: [0] enable, [1] invert output
// The platform lists a PWM controller; one channel and 16-bit counters are
// this design's choices.
module pwm
  import soc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  output logic     pwm_o
);
  logic [W-1:0] period, duty, period_a, duty_a, cnt;
  logic [1:0]   ctrl;
  logic         wr;

  assign wr = req.psel && req.penable && req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period <= '0; duty <= '0; period_a <= '0; duty_a <= '0;
      cnt <= '0; ctrl <= '0; pwm_o <= 1'b0;
    end else begin
      if (wr) begin
        unique case (req.paddr[7:0])
          8'h00: period <= req.pwdata[W-1:0];
          8'h04: duty   <= req.pwdata[W-1:0];
          8'h08: ctrl   <= req.pwdata[1:0];
          default: ;
        endcase
      end
      if (!ctrl[0]) begin
        cnt      <= '0;
        period_a <= period;
        duty_a   <= duty;
        pwm_o    <= ctrl[1];
      end else begin
        if (cnt + 1'b1 >= period_a) begin
          cnt      <= '0;
          period_a <= period;
          duty_a   <= duty;
          pwm_o    <= (duty != '0) ^ ctrl[1];
        end else begin
          cnt   <= cnt + 1'b1;
          pwm_o <= ((cnt + 1'b1) < duty_a) ^ ctrl[1];
        end
      end
    end
  end

  always_comb begin
    rsp.pready = 1'b1;
    unique case (req.paddr[7:0])
      8'h00:   rsp.prdata = 32'(period);
      8'h04:   rsp.prdata = 32'(duty);
      8'h08:   rsp.prdata = {30'd0, ctrl};
      default: rsp.prdata = '0;
    endcase
  end
endmodule
