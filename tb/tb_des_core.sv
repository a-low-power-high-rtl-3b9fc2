`timescale 1ns/1ps
// tb_des_core: DES and triple-DES known answers. The classic DES example
// (key 133457799BBCDFF1) and vectors from an independent DES implementation
// are encrypted and decrypted as DES, as three-key triple-DES and as
// two-key triple-DES (K3 = K1). Checks latency of 17 and 49 clocks.
module tb_des_core;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `TB_WATCHDOG(clk, 20000)

  logic [191:0] key;
  logic triple = 0, decrypt = 0, start = 0;
  logic [63:0] din, dout;
  logic busy, done;

  des_core dut (.clk, .rst_n, .key, .triple, .decrypt, .start, .din, .dout, .busy, .done);

  typedef struct { bit t; logic [191:0] k; logic [63:0] p, c; } vec_t;
  vec_t v [8] = '{
    '{0, {64'h133457799BBCDFF1, 128'd0}, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{0, {64'h301850c5a38fd547, 128'd0}, 64'h907a70c31012f037, 64'ha8edb8bf1c96ad71},
    '{0, {64'h9e7769b10f4205b4, 128'd0}, 64'hc6f877186d76b07e, 64'h4bb3bb837432aa36},
    '{0, {64'h7731af10506bf2ef, 128'd0}, 64'h3f98e2774cbd87ad, 64'h71dc2099666c5ef3},
    '{1, 192'h301850c5a38fd54718f135d25f557203b64ce4228c38fb29, 64'h907a70c31012f037, 64'h43327d3860f66307},
    '{1, 192'h9e7769b10f4205b47f15052434b9b5df881ed162ae2eb154, 64'hc6f877186d76b07e, 64'hf629257ead63932d},
    '{1, 192'h7731af10506bf2efec66a78795e761d15c90a9587403e430, 64'h3f98e2774cbd87ad, 64'hd73c3bbecc747e60},
    '{1, {128'h2e05319acb5c7427c7a2ea20b2f14c94, 64'h2e05319acb5c7427}, 64'h14f4733f3e7d1bfb, 64'h4a4104d071cb485b}};

  task automatic run(input logic dec, input logic [63:0] x, output logic [63:0] y, output int cyc);
    @(negedge clk); din = x; decrypt = dec; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    y = dout;
  endtask

  initial begin
    logic [63:0] y;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (v[i]) begin
      key = v[i].k; triple = v[i].t;
      run(1'b0, v[i].p, y, cyc);
      chk(y == v[i].c, $sformatf("#%0d encrypt %h expected %h", i, y, v[i].c));
      chk(cyc == (v[i].t ? 49 : 17), $sformatf("#%0d: %0d clocks", i, cyc));
      run(1'b1, v[i].c, y, cyc);
      chk(y == v[i].p, $sformatf("#%0d decrypt %h expected %h", i, y, v[i].p));
    end
    finish_tb();
  end
endmodule
