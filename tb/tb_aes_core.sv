`timescale 1ns/1ps
// tb_aes_core: AES known-answer tests. The FIPS-197 appendix C examples for
// 128/192/256-bit keys and further vectors from an independent AES
// implementation are encrypted and decrypted. Checks the block latency of
// Nr clocks (10 for AES-128, i.e. 128 bits per 10 clocks = 2.56 Gbps at
// 200 MHz) and back-to-back blocks without a key reload.
module tb_aes_core;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `TB_WATCHDOG(clk, 20000)

  logic [255:0] key;
  logic [1:0]   key_len;
  logic         key_load = 0, start = 0, decrypt = 0;
  logic         key_ready, busy, done;
  logic [127:0] din, dout;

  aes_core dut (.clk, .rst_n, .key, .key_len, .key_load, .key_ready, .start, .decrypt,
                .din, .dout, .busy, .done);

  typedef struct { int kl; logic [255:0] k; logic [127:0] p, c; } vec_t;
  vec_t v [9] = '{
    '{128, 256'h000102030405060708090a0b0c0d0e0f << 128, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a},
    '{192, 256'h000102030405060708090a0b0c0d0e0f1011121314151617 << 64, 128'h00112233445566778899aabbccddeeff, 128'hdda97ca4864cdfe06eaf70a0ec0d7191},
    '{256, 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089},
    '{128, 256'h6513270e269e0d37f2a74de452e6b438 << 128, 128'hd23f0824128b2f330c5c7fd0a6a3a450, 128'h067f00af5a31d5cc97d103ab15f4a127},
    '{128, 256'h9531985d5d9dc9f81818e811892f902b << 128, 128'h36f675cc81e74ef5e8e25d940ed90475, 128'h57f1edb5d3d6b1db78b294e1f326138c},
    '{192, 256'h3d9c172411e20b8f6b0d549b6f03675a1600a35a099950d8 << 64, 128'h0f21ddb66cad4a268d116ece1738f7d9, 128'hf230ff727339cd72ce7bc7958a36347d},
    '{192, 256'ha170b33839263059f28c105d1fb17c2390c192cfd3ac94af << 64, 128'h0fd630f1f29d0da9953f48f1a09f76b5, 128'h8e7ca092b96cdc342a0a940473c90002},
    '{256, 256'h8e81973e0becd7b03898d190f9ebdacc0cb1e29c658cda1495e60af593bd04cf, 128'h6b4cb2424a23d5962217beaddbc496cb, 128'hec20da378d5dbfa75cc6be156e2fcb6d},
    '{256, 256'hae97ba94d0eda82f8f6d05584ef8aa38922766581e27a1c08a6a63ec24ede6a4, 128'h923a736994e3bf911a61dbe22e44158b, 128'h7cd7633cda69e35b6fe0e2080923f0c3}};

  task automatic run(input logic dec, input logic [127:0] x, output logic [127:0] y, output int cyc);
    @(negedge clk); din = x; decrypt = dec; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    y = dout;
  endtask

  initial begin
    logic [127:0] y;
    int cyc, nr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (v[i]) begin
      key = v[i].k;
      key_len = (v[i].kl == 128) ? 2'd0 : (v[i].kl == 192) ? 2'd1 : 2'd2;
      nr = (v[i].kl == 128) ? 10 : (v[i].kl == 192) ? 12 : 14;
      @(negedge clk) key_load = 1;
      @(negedge clk) key_load = 0;
      while (!key_ready) @(negedge clk);
      run(1'b0, v[i].p, y, cyc);
      chk(y == v[i].c, $sformatf("AES-%0d #%0d encrypt %h expected %h", v[i].kl, i, y, v[i].c));
      chk(cyc == nr, $sformatf("AES-%0d: %0d clocks per block, expected %0d", v[i].kl, cyc, nr));
      run(1'b1, v[i].c, y, cyc);
      chk(y == v[i].p, $sformatf("AES-%0d #%0d decrypt %h", v[i].kl, i, y));
      chk(cyc == nr, "decrypt latency");
    end
    // back to back AES-128: four blocks in 40 clocks
    key = v[0].k; key_len = 0;
    @(negedge clk) key_load = 1;
    @(negedge clk) key_load = 0;
    while (!key_ready) @(negedge clk);
    begin
      int t0, nd;
      din = v[0].p; decrypt = 0; nd = 0; t0 = 0;
      while (nd < 4) begin
        start = !busy;
        @(negedge clk);
        t0++;
        if (done) begin nd++; chk(dout == v[0].c, "stream block"); end
      end
      start = 0;
      chk(t0 <= 41, $sformatf("4 blocks in %0d clocks", t0));
    end
    finish_tb();
  end
endmodule
