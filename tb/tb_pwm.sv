`timescale 1ns/1ps
// tb_pwm: measures high time and period of the output for several duty
// settings against PERIOD/DUTY, and the inverted polarity.
module tb_pwm;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 50000)

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic pwm_o;

  pwm dut (.clk, .rst_n, .req, .rsp, .pwm_o);

  task automatic measure(input int period, output int hi, output int per);
    @(posedge pwm_o);
    hi = 0; per = 0;
    repeat (period) begin @(negedge clk); hi += pwm_o; end
    per = period;
  endtask

  initial begin
    int hi, per;
    int duties [4] = '{1, 5, 12, 19};
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_write(20'h00, 20);
    foreach (duties[k]) begin
      apb_write(20'h04, duties[k]);
      apb_write(20'h08, 1);
      repeat (45) @(posedge clk);
      measure(20, hi, per);
      chk(hi == duties[k], $sformatf("duty %0d: high %0d of 20", duties[k], hi));
      measure(40, hi, per);
      chk(hi == 2 * duties[k], "two periods");
    end
    apb_write(20'h04, 5);
    apb_write(20'h08, 3);
    repeat (45) @(posedge clk);
    @(negedge pwm_o);
    hi = 0;
    repeat (20) begin @(negedge clk); hi += pwm_o; end
    chk(hi == 15, $sformatf("inverted: high %0d of 20", hi));
    apb_write(20'h08, 0);
    repeat (5) @(posedge clk);
    chk(pwm_o == 0, "disabled output low");
    finish_tb();
  end
endmodule
