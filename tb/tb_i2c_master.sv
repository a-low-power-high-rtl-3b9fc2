`timescale 1ns/1ps
// tb_i2c_master: an I2C slave model on open-drain lines. Reads a sensor the
// way the platform's temperature example does: START, address+W, register
// number, repeated START, address+R, two data bytes (ACK then NACK), STOP.
// Checks the bytes the slave saw, START/STOP detection, acknowledges (also
// a NACK from an absent address) and the read data.
module tb_i2c_master;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `include "apb_tasks.svh"
  `TB_WATCHDOG(clk, 200000)

  apb_req_t req = '0;
  apb_rsp_t rsp;
  logic scl_oe, sda_oe, irq, scl, sda;
  logic s_oe = 0;
  assign scl = !scl_oe;
  assign sda = !(sda_oe || s_oe);

  i2c_master dut (.clk, .rst_n, .req, .rsp, .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe, .irq);

  // ---- slave model, address 0x48
  typedef enum {S_IDLE, S_ADDR, S_WR, S_RD, S_IGN} sst_e;
  sst_e st = S_IDLE;
  int bitcnt = 0, rbit = 0, starts = 0, stops = 0;
  logic [7:0] sh, txb;
  logic [7:0] got [$];
  logic [7:0] rd_data [2] = '{8'h1A, 8'hC5};
  int rd_idx = 0;
  logic master_acks [$];

  always @(negedge sda) if (scl) begin st = S_ADDR; bitcnt = 0; starts++; s_oe = 0; end
  always @(posedge sda) if (scl) begin st = S_IDLE; stops++; end
  always @(posedge scl) begin
    if ((st == S_ADDR || st == S_WR) && bitcnt < 8) begin sh = {sh[6:0], sda}; bitcnt++; end
    if (st == S_RD && rbit == 9) master_acks.push_back(!sda);
  end
  always @(negedge scl) begin
    if (st == S_ADDR || st == S_WR) begin
      if (bitcnt == 8) begin
        if (st == S_WR || sh[7:1] == 7'h48) s_oe = 1;
        bitcnt = 9;
      end else if (bitcnt == 9) begin
        s_oe = 0; bitcnt = 0;
        got.push_back(sh);
        if (st == S_ADDR) begin
          if (sh[7:1] != 7'h48) st = S_IGN;
          else if (sh[0]) begin
            st = S_RD; txb = rd_data[0]; rd_idx = 1; s_oe = !txb[7]; rbit = 1;
          end else st = S_WR;
        end
      end
    end else if (st == S_RD) begin
      if (rbit < 8)       begin s_oe = !txb[7 - rbit]; rbit++; end
      else if (rbit == 8) begin s_oe = 0; rbit = 9; end
      else if (master_acks.size() > 0 && master_acks[$]) begin
        txb = rd_data[rd_idx % 2]; rd_idx++; s_oe = !txb[7]; rbit = 1;
      end else begin s_oe = 0; st = S_IGN; end
    end
  end

  task automatic cmd(input logic [4:0] c);
    apb_write(20'h00, 32'(c));
    while (!irq) @(posedge clk);
    apb_write(20'h0C, 4);
  endtask

  initial begin
    logic [31:0] q;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_write(20'h10, 3);       // quarter bit = 4 clocks
    apb_write(20'h14, 1);
    apb_write(20'h04, {24'd0, 7'h48, 1'b0});
    cmd(5'b00101);              // START + write
    apb_read(20'h0C, q);
    chk(q[1], "address acknowledged");
    apb_write(20'h04, 8'h05);
    cmd(5'b00100);              // write register number
    apb_read(20'h0C, q);
    chk(q[1], "register byte acknowledged");
    apb_write(20'h04, {24'd0, 7'h48, 1'b1});
    cmd(5'b00101);              // repeated START + address read
    cmd(5'b01000);              // read, ACK
    apb_read(20'h08, q);
    chk(q[7:0] == 8'h1A, $sformatf("first byte %h", q[7:0]));
    cmd(5'b11010);              // read, NACK, STOP
    apb_read(20'h08, q);
    chk(q[7:0] == 8'hC5, $sformatf("second byte %h", q[7:0]));
    chk(got.size() == 3 && got[0] == 8'h90 && got[1] == 8'h05 && got[2] == 8'h91,
        "slave saw address, register, address");
    chk(master_acks.size() == 2 && master_acks[0] && !master_acks[1], "master ACK then NACK");
    chk(starts == 2 && stops == 1, $sformatf("%0d starts %0d stops", starts, stops));
    chk(scl && sda, "bus released");
    // absent device
    apb_write(20'h04, {24'd0, 7'h21, 1'b0});
    cmd(5'b00111);
    apb_read(20'h0C, q);
    chk(!q[1], "absent device not acknowledged");
    chk(stops == 2, "stop after write");
    finish_tb();
  end
endmodule
