`timescale 1ns/1ps
// tb_sec_engine: the security engines with their DMA on a memory model.
// Software steps: write the key, configure, load the AES key, set source,
// destination and block count, start, wait for the interrupt. Three AES-128
// blocks are encrypted and then decrypted in memory, and two triple-DES
// blocks encrypted; results are compared with an independent AES/DES
// implementation's outputs.
module tb_sec_engine;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "sbus_tasks.svh"
  `TB_WATCHDOG(clk, 50000)

  sbus_req_t sreq = '0;
  sbus_rsp_t srsp;
  sbus_req_t mreq;
  sbus_rsp_t mrsp;
  logic irq;

  sec_engine dut (.clk, .rst_n, .s_req(sreq), .s_rsp(srsp), .m_req(mreq), .m_rsp(mrsp), .irq);
  sram_mem #(.SIZE_BYTES(1024)) u_mem (.clk, .rst_n, .req(mreq), .rsp(mrsp));

  localparam logic [31:0] B = 32'h2000_0000;
  logic [127:0] pt [3] = '{128'h216363698b529b4a97b750923ceb3ffd, 128'h795b929e9a9a80fdea7b5bf55eb561a4,
                           128'h9b08923d10c67fd994b2b8fda02f34a6};
  logic [127:0] ct [3] = '{128'h37e7abbbee03c6bfff4fe9723ced7521, 128'h0edc6390e12bb9dee4d30ce07ec0c49f,
                           128'h61f38795e859f35ca3768a9913c7bb99};
  logic [63:0] dpt [2] = '{64'he8a8529f035efa25, 64'h781f9c58d6645fa9};
  logic [63:0] dct [2] = '{64'hff21c403bd587517, 64'h113553190862c05f};

  task automatic run_dma(input logic [31:0] src, input logic [31:0] dst, input int n);
    logic [31:0] q;
    sb_write(B + 32'h0C, src);
    sb_write(B + 32'h10, dst);
    sb_write(B + 32'h14, n);
    sb_write(B + 32'h04, 1);
    while (!irq) @(posedge clk);
    sb_read(B + 32'h08, q);
    chk(q[1:0] == 2'b10, "done, not busy");
    sb_write(B + 32'h08, 2);
  endtask

  initial begin
    logic [31:0] q;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++)
      for (int w = 0; w < 4; w++) u_mem.mem[16 * 0 + 4*i + w] = pt[i][127 - 32*w -: 32];
    for (int i = 0; i < 4; i++) sb_write(B + 32'h20 + 32'(4*i), 32'h00010203 + 32'h04040404 * 32'(i));
    sb_write(B + 32'h18, 1);
    sb_write(B + 32'h00, 0);                // AES, encrypt, 128-bit key
    sb_write(B + 32'h04, 2);                // expand key
    do sb_read(B + 32'h08, q); while (!q[2]);
    run_dma(32'h000, 32'h100, 3);
    for (int i = 0; i < 3; i++)
      chk({u_mem.mem[64+4*i], u_mem.mem[65+4*i], u_mem.mem[66+4*i], u_mem.mem[67+4*i]} == ct[i],
          $sformatf("AES block %0d", i));
    sb_write(B + 32'h00, 32'b100);          // AES decrypt
    run_dma(32'h100, 32'h200, 3);
    for (int i = 0; i < 3; i++)
      chk({u_mem.mem[128+4*i], u_mem.mem[129+4*i], u_mem.mem[130+4*i], u_mem.mem[131+4*i]} == pt[i],
          $sformatf("AES decrypted block %0d", i));
    // triple-DES, three keys
    sb_write(B + 32'h20, 32'h01234567); sb_write(B + 32'h24, 32'h89abcdef);
    sb_write(B + 32'h28, 32'h23456789); sb_write(B + 32'h2C, 32'habcdef01);
    sb_write(B + 32'h30, 32'h456789ab); sb_write(B + 32'h34, 32'hcdef0123);
    for (int i = 0; i < 2; i++) begin
      u_mem.mem[192 + 2*i] = dpt[i][63:32];
      u_mem.mem[193 + 2*i] = dpt[i][31:0];
    end
    sb_write(B + 32'h00, 32'd2);
    run_dma(32'h300, 32'h340, 2);
    for (int i = 0; i < 2; i++)
      chk({u_mem.mem[208 + 2*i], u_mem.mem[209 + 2*i]} == dct[i], $sformatf("3DES block %0d", i));
    finish_tb();
  end
endmodule
