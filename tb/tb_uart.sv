`timescale 1ns/1ps
// tb_uart: the testbench's own serial line model sends frames to rx and
// decodes tx, at 8 clocks per bit. Checks transmitted bytes and frame
// length, received bytes, the receive interrupt and the overrun flag.
module tb_uart;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 50000)

  localparam int DIV = 8;
  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic rx = 1, tx, irq;

  uart dut (.clk, .rst_n, .req, .rsp, .rx, .tx, .irq);

  task automatic send_frame(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (DIV) @(posedge clk);
    end
  endtask

  task automatic recv_frame(output logic [7:0] b, output int len);
    int t0;
    @(negedge tx);
    t0 = 0;
    repeat (DIV / 2) begin @(posedge clk); t0++; end
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) @(posedge clk);
      b[i] = tx;
    end
    repeat (DIV) @(posedge clk);
    chk(tx == 1, "stop bit");
    len = 0;
    while (tx) begin @(posedge clk); len++; if (len > 4 * DIV) break; end
  endtask

  initial begin
    logic [31:0] q;
    logic [7:0] b;
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_write(20'h08, DIV);
    apb_write(20'h0C, 1);
    for (int n = 0; n < 6; n++) begin
      logic [7:0] v = 8'($urandom);
      fork
        apb_write(20'h00, 32'(v));
        recv_frame(b, len);
      join
      chk(b == v, $sformatf("tx byte %h expected %h", b, v));
      apb_read(20'h04, q);
      chk(q[0] == 0, "tx idle after frame");
    end
    for (int n = 0; n < 6; n++) begin
      logic [7:0] v = 8'($urandom);
      send_frame(v);
      repeat (2) @(posedge clk);
      chk(irq, "receive interrupt");
      apb_read(20'h00, q);
      chk(q[7:0] == v, $sformatf("rx byte %h expected %h", q[7:0], v));
      #1 chk(!irq, "interrupt cleared by read");
    end
    send_frame(8'h11);
    send_frame(8'h22);
    apb_read(20'h04, q);
    chk(q[2:1] == 2'b11, "overrun flagged, first byte kept");
    apb_read(20'h00, q);
    chk(q[7:0] == 8'h11, "first byte kept on overrun");
    finish_tb();
  end
endmodule
