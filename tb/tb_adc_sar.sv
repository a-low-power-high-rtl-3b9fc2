`timescale 1ns/1ps
// tb_adc_sar: the SAR control logic with the analog front-end model.
// Random inputs and the two ends of the range are converted; the result
// must be floor(vin / 16) (12-bit code of a 16-bit input fraction), and a
// conversion must take SAMPLE_CYCLES + 12 clocks.
module tb_adc_sar;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 50000)

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic sample, cmp, irq;
  logic [11:0] dac;
  logic [15:0] vin;

  adc_sar #(.NBITS(12), .SAMPLE_CYCLES(4)) dut (.clk, .rst_n, .req, .rsp, .sample,
    .dac_code(dac), .cmp, .irq);
  adc_afe u_afe (.sample, .vin_frac(vin), .dac_code(dac), .cmp);

  initial begin
    logic [31:0] q;
    int t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_write(20'h0C, 1);
    for (int n = 0; n < 40; n++) begin
      vin = (n == 0) ? 16'h0000 : (n == 1) ? 16'hFFFF : 16'($urandom);
      apb_write(20'h00, 1);
      t = 0;
      while (!irq) begin @(posedge clk); #1; t++; end
      chk(t == 4 + 12, $sformatf("conversion took %0d clocks", t));
      apb_read(20'h08, q);
      chk(q == 32'(vin >> 4), $sformatf("vin %h: code %h expected %h", vin, q, vin >> 4));
      apb_write(20'h04, 2);
    end
    finish_tb();
  end
endmodule
