`timescale 1ns/1ps
// sec_engine: the security engines with their register interface and DMA.
//
// Holds the AES core and the DES/triple-DES core behind a system-bus slave
// port, and a system-bus master port for the DMA that feeds them, so that a
// run of blocks is encrypted or decrypted without the CPU. Software writes
// the key, selects engine and direction, gives source and destination
// addresses and a block count, and sets START. For each block the DMA reads
// the block's words from SRC (4 for AES, 2 for DES), starts the engine,
// waits for it, writes the result to DST and advances both addresses. When
// all blocks are done it sets DONE and raises irq if enabled.
// Word k of a block at address A+4k holds block bits [W-1-32k -: 32], i.e.
// the first word is the most significant.
// Registers (system bus, one-cycle response):
//   0x00 CTRL   r/w: [1:0] engine (0 AES, 1 DES, 2 triple-DES), [2] decrypt,
//                    [4:3] AES key length (0/1/2 = 128/192/256),
//                    [6:5] triple-DES keying (0: K1 K2 K3, 1: K1 K2 K1, 2: K1 K1 K1)
//   0x04 CMD    w: [0] start the DMA run, [1] load (expand) the AES key
//   0x08 STATUS r: [0] busy, [1] done, [2] AES key ready (w: 1 to [1] clears)
//   0x0C SRC    0x10 DST    0x14 NBLK (block count)    0x18 INTEN [0]
//   0x20..0x3C KEY0..KEY7: 256-bit key register, KEY0 most significant.
//              DES keys: K1 = {KEY0,KEY1}, K2 = {KEY2,KEY3}, K3 = {KEY4,KEY5}.
// The engines, the encrypt/decrypt bit and the DMA are the platform's; the
// register map and DMA scheme are this design's.
module sec_engine
  import soc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  sbus_req_t s_req,
  output sbus_rsp_t s_rsp,
  output sbus_req_t m_req,
  input  sbus_rsp_t m_rsp,
  output logic      irq
);
  typedef enum logic [2:0] {D_IDLE, D_READ, D_START, D_WAIT, D_WRITE, D_NEXT} dstate_e;

  logic [6:0]   ctrl;
  logic [31:0]  src, dst, nblk;
  logic [31:0]  keyr [8];
  logic         inten, done_f;
  logic         resp;
  logic [31:0]  rdata;
  dstate_e      ds;
  logic [1:0]   wi;        // word index within a block
  logic [127:0] blk;
  logic         aes_start, des_start, aes_load;
  logic         aes_done, des_done, aes_busy, des_busy, aes_kr;
  logic [127:0] aes_out;
  logic [63:0]  des_out;
  logic [255:0] key_flat;
  logic [191:0] des_key;
  logic         is_aes;
  logic [1:0]   nwords_m1;

  for (genvar i = 0; i < 8; i++) begin : g_key
    assign key_flat[255 - 32*i -: 32] = keyr[i];
  end
  always_comb begin
    unique case (ctrl[6:5])
      2'd1:    des_key = {key_flat[255:128], key_flat[255:192]};
      2'd2:    des_key = {key_flat[255:192], key_flat[255:192], key_flat[255:192]};
      default: des_key = key_flat[255:64];
    endcase
  end
  assign is_aes    = (ctrl[1:0] == 2'd0);
  assign nwords_m1 = is_aes ? 2'd3 : 2'd1;

  aes_core u_aes (
    .clk, .rst_n, .key(key_flat), .key_len(ctrl[4:3]), .key_load(aes_load),
    .key_ready(aes_kr), .start(aes_start), .decrypt(ctrl[2]), .din(blk),
    .dout(aes_out), .busy(aes_busy), .done(aes_done));

  des_core u_des (
    .clk, .rst_n, .key(des_key), .triple(ctrl[1:0] == 2'd2), .decrypt(ctrl[2]),
    .start(des_start), .din(blk[127:64]), .dout(des_out), .busy(des_busy), .done(des_done));

  // ---------------- register slave
  logic s_acc, s_wr;
  assign s_acc = s_req.valid && !resp;
  assign s_wr  = s_acc && s_req.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0; src <= '0; dst <= '0; nblk <= '0; inten <= 1'b0; done_f <= 1'b0;
      for (int i = 0; i < 8; i++) keyr[i] <= '0;
      resp <= 1'b0; rdata <= '0; aes_load <= 1'b0;
      ds <= D_IDLE; wi <= '0; blk <= '0; aes_start <= 1'b0; des_start <= 1'b0;
      m_req <= '0;
    end else begin
      resp      <= s_acc;
      aes_load  <= 1'b0;
      aes_start <= 1'b0;
      des_start <= 1'b0;
      if (s_acc && !s_req.we) begin
        unique case (s_req.addr[7:0])
          8'h00:   rdata <= {25'd0, ctrl};
          8'h08:   rdata <= {29'd0, aes_kr, done_f, ds != D_IDLE};
          8'h0C:   rdata <= src;
          8'h10:   rdata <= dst;
          8'h14:   rdata <= nblk;
          8'h18:   rdata <= {31'd0, inten};
          default: rdata <= (s_req.addr[7:5] == 3'b001) ? keyr[s_req.addr[4:2]] : '0;
        endcase
      end
      // ---------------- DMA
      unique case (ds)
        D_IDLE: if (s_wr && s_req.addr[7:0] == 8'h04 && s_req.wdata[0] && nblk != '0) begin
          ds     <= D_READ;
          wi     <= '0;
          done_f <= 1'b0;
          m_req  <= '{valid: 1'b1, we: 1'b0, addr: src, wdata: '0, be: 4'hF};
        end
        D_READ: if (m_rsp.ready) begin
          blk[127 - 32*wi -: 32] <= m_rsp.rdata;
          if (wi == nwords_m1) begin
            m_req.valid <= 1'b0;
            ds          <= D_START;
          end else begin
            m_req.addr <= m_req.addr + 32'd4;
          end
          wi <= wi + 1'b1;
        end
        D_START: begin
          if (is_aes) aes_start <= 1'b1;
          else        des_start <= 1'b1;
          ds <= D_WAIT;
        end
        D_WAIT: if (aes_done || des_done) begin
          blk   <= is_aes ? aes_out : {des_out, 64'd0};
          wi    <= '0;
          ds    <= D_WRITE;
          m_req <= '{valid: 1'b1, we: 1'b1, addr: dst,
                     wdata: is_aes ? aes_out[127:96] : des_out[63:32], be: 4'hF};
        end
        D_WRITE: if (m_rsp.ready) begin
          if (wi == nwords_m1) begin
            m_req.valid <= 1'b0;
            ds          <= D_NEXT;
          end else begin
            m_req.addr  <= m_req.addr + 32'd4;
            m_req.wdata <= blk[127 - 32*(wi + 2'd1) -: 32];
          end
          wi <= wi + 1'b1;
        end
        D_NEXT: begin
          src  <= src + 32'(4 * (nwords_m1 + 1));
          dst  <= dst + 32'(4 * (nwords_m1 + 1));
          nblk <= nblk - 1'b1;
          if (nblk == 32'd1) begin
            ds     <= D_IDLE;
            done_f <= 1'b1;
          end else begin
            ds    <= D_READ;
            wi    <= '0;
            m_req <= '{valid: 1'b1, we: 1'b0, addr: src + 32'(4 * (nwords_m1 + 1)),
                       wdata: '0, be: 4'hF};
          end
        end
        default: ds <= D_IDLE;
      endcase
      // register writes (configuration is not changed during a run)
      if (s_wr) begin
        unique case (s_req.addr[7:0])
          8'h00: if (ds == D_IDLE) ctrl <= s_req.wdata[6:0];
          8'h04: if (ds == D_IDLE && s_req.wdata[1]) aes_load <= 1'b1;
          8'h08: if (s_req.wdata[1]) done_f <= 1'b0;
          8'h0C: if (ds == D_IDLE) src <= s_req.wdata;
          8'h10: if (ds == D_IDLE) dst <= s_req.wdata;
          8'h14: if (ds == D_IDLE) nblk <= s_req.wdata;
          8'h18: inten <= s_req.wdata[0];
          default: if (s_req.addr[7:5] == 3'b001 && ds == D_IDLE) keyr[s_req.addr[4:2]] <= s_req.wdata;
        endcase
      end
    end
  end

  assign s_rsp.ready = resp;
  assign s_rsp.err   = 1'b0;
  assign s_rsp.rdata = rdata;
  assign irq         = done_f && inten;

  a_dma_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_req.valid && !m_rsp.ready) |=> $stable(m_req));
endmodule
