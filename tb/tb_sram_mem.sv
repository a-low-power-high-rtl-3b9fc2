`timescale 1ns/1ps
// tb_sram_mem: writes random words and byte lanes into the SRAM and reads
// them back against a reference copy kept by the testbench; checks that a
// response comes exactly one cycle after the request.
module tb_sram_mem;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  sbus_req_t sreq = '0;
  sbus_rsp_t srsp;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "sbus_tasks.svh"
  `TB_WATCHDOG(clk, 20000)

  sram_mem #(.SIZE_BYTES(1024)) dut (.clk, .rst_n, .req(sreq), .rsp(srsp));

  logic [31:0] ref_m [256];
  logic [31:0] q, d;
  logic e;
  int lat;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      ref_m[i] = $urandom;
      sb_write(32'(4*i), ref_m[i]);
    end
    for (int n = 0; n < 200; n++) begin
      int i = $urandom_range(0, 255);
      logic [3:0] be = 4'($urandom);
      d = $urandom;
      sb_access(1'b1, 32'(4*i), d, be, q, e);
      for (int b = 0; b < 4; b++) if (be[b]) ref_m[i][8*b +: 8] = d[8*b +: 8];
    end
    for (int i = 0; i < 256; i++) begin
      sb_read(32'(4*i), q);
      chk(q == ref_m[i], $sformatf("word %0d: %h expected %h", i, q, ref_m[i]));
    end
    // latency: ready exactly one cycle after the request is presented
    @(negedge clk);
    sreq = '{valid: 1'b1, we: 1'b0, addr: 32'h10, wdata: '0, be: 4'hF};
    lat = 0;
    @(posedge clk); #1;
    while (!srsp.ready) begin lat++; @(posedge clk); #1; end
    chk(lat == 0, $sformatf("latency %0d extra cycles", lat));
    chk(srsp.rdata == ref_m[4], "rdata with ready");
    @(negedge clk); sreq = '0;
    finish_tb();
  end
endmodule
