`timescale 1ns/1ps
// tb_nor_ctrl: a NOR flash model whose data is valid only ACC clocks after
// the address settles (garbage before). Checks 32-bit word reads assembled
// from two half-words, low half first, that reads fail with too few wait
// states and pass with enough, and the read-only strobes.
module tb_nor_ctrl;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 50000)

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic [14:0] nor_addr;
  logic [15:0] nor_dq;
  logic nor_ce_n, nor_oe_n, nor_we_n;

  nor_ctrl #(.AW(15)) dut (.clk, .rst_n, .req, .rsp, .nor_addr, .nor_dq, .nor_ce_n, .nor_oe_n, .nor_we_n);

  // flash model: contents are a function of the address
  function automatic logic [15:0] content(input logic [14:0] a);
    return 16'(a) * 16'd40503 ^ 16'h5A3C;
  endfunction
  int stable = 0, we_seen = 0;
  logic [14:0] last_a;
  always @(posedge clk) begin
    if (nor_addr != last_a || nor_ce_n || nor_oe_n) stable <= 0;
    else stable <= stable + 1;
    last_a <= nor_addr;
    if (!nor_we_n) we_seen++;
  end
  assign nor_dq = (!nor_ce_n && !nor_oe_n && stable >= 2) ? content(nor_addr) : 16'hDEAD;

  initial begin
    logic [31:0] q;
    int bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_read(20'hFFFC, q);
    chk(q == 3, "reset wait states");
    for (int n = 0; n < 20; n++) begin
      logic [13:0] w = 14'($urandom);
      apb_read({4'd0, w, 2'b00}, q);
      chk(q == {content({w, 1'b1}), content({w, 1'b0})}, $sformatf("word %h: %h", w, q));
    end
    apb_write(20'hFFFC, 0);
    bad = 0;
    for (int n = 0; n < 5; n++) begin
      apb_read(20'(4 * n), q);
      if (q != {content(15'(2*n+1)), content(15'(2*n))}) bad++;
    end
    chk(bad == 5, "too few wait states read garbage");
    apb_write(20'hFFFC, 5);
    apb_read(20'h0040, q);
    chk(q == {content(15'h21), content(15'h20)}, "more wait states still fine");
    apb_write(20'h0040, 32'h1234);
    chk(we_seen == 0 && nor_ce_n && nor_oe_n, "no write strobe, idle deselected");
    finish_tb();
  end
endmodule
