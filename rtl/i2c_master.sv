`timescale 1ns/1ps
// i2c_master: I2C bus master on the peripheral bus.
//
// The platform has two; they read sensors (temperature, humidity,
// accelerometer). Software issues byte-level commands: a CMD write may ask
// for a START (or repeated START), one byte written or read, and a STOP, in
// that order. Every bus bit is cut into four quarters of DIV+1 clocks:
//   q0 SCL low, SDA set up   q1 SCL released   q2 SDA sampled   q3 SCL low
// START releases SDA then SCL and pulls SDA low while SCL is high; STOP
// pulls SDA low, releases SCL, then releases SDA. A written byte is followed
// by the slave's acknowledge bit (STATUS[1] = 1 when the slave pulled SDA
// low); after a read byte the master sends ACK, or NACK when CMD[4] is set.
// A slave that holds SCL low stretches the clock. Both lines are open
// drain: an *_oe output of 1 pulls the line low.
// Registers (APB, no wait states):
//   0x00 CMD    w: [0] start, [1] stop, [2] write byte, [3] read byte, [4] nack
//   0x04 TXDATA r/w   0x08 RXDATA r
//   0x0C STATUS r: [0] busy, [1] slave ack, [2] done (w: 1 to [2] clears)
//   0x10 DIV    r/w: quarter-bit time - 1 (reset 124: 100 kHz from 50 MHz)
//   0x14 INTEN  r/w: [0] interrupt on done
// The command scheme and the register layout are this design's choices.
module i2c_master
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  input  logic     scl_i,
  input  logic     sda_i,
  output logic     scl_oe,
  output logic     sda_oe,
  output logic     irq
);
  typedef enum logic [1:0] {P_IDLE, P_START, P_BYTE, P_STOP} phase_e;
  phase_e      phase;
  logic [1:0]  q;
  logic [15:0] div, cnt;
  logic [3:0]  k;
  logic        do_stop, do_rw, is_read, nack;
  logic [7:0]  txd, rxd;
  logic        ack, done, inten;
  logic        wr, qtick, stretch;

  assign wr      = req.psel && req.penable && req.pwrite;
  assign stretch = (q == 2'd2) && !scl_oe && !scl_i;
  assign qtick   = (phase != P_IDLE) && (cnt == div) && !stretch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE; q <= '0; div <= 16'd124; cnt <= '0; k <= '0;
      do_stop <= 1'b0; do_rw <= 1'b0; is_read <= 1'b0; nack <= 1'b0;
      txd <= '0; rxd <= '0; ack <= 1'b0; done <= 1'b0; inten <= 1'b0;
      scl_oe <= 1'b0; sda_oe <= 1'b0;
    end else begin
      if (phase != P_IDLE && !stretch) cnt <= (cnt == div) ? '0 : cnt + 1'b1;
      if (qtick) begin
        q <= q + 1'b1;
        unique case (phase)
          P_START: begin
            unique case (q)
              2'd0: sda_oe <= 1'b0;
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b1;
              2'd3: begin
                scl_oe <= 1'b1;
                k      <= '0;
                phase  <= do_rw ? P_BYTE : (do_stop ? P_STOP : P_IDLE);
                if (!do_rw && !do_stop) done <= 1'b1;
              end
            endcase
          end
          P_BYTE: begin
            unique case (q)
              2'd0: begin
                if (k == 4'd8) sda_oe <= is_read ? !nack : 1'b0;
                else           sda_oe <= is_read ? 1'b0 : !txd[3'd7 - k[2:0]];
              end
              2'd1: scl_oe <= 1'b0;
              2'd2: begin
                if (k == 4'd8) begin
                  if (!is_read) ack <= !sda_i;
                end else if (is_read) rxd <= {rxd[6:0], sda_i};
              end
              2'd3: begin
                scl_oe <= 1'b1;
                if (k == 4'd8) begin
                  phase <= do_stop ? P_STOP : P_IDLE;
                  if (!do_stop) done <= 1'b1;
                end
                k <= k + 1'b1;
              end
            endcase
          end
          P_STOP: begin
            unique case (q)
              2'd0: sda_oe <= 1'b1;
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b0;
              2'd3: begin phase <= P_IDLE; done <= 1'b1; end
            endcase
          end
          default: ;
        endcase
      end
      if (wr) begin
        unique case (req.paddr[7:0])
          8'h00: if (phase == P_IDLE && (req.pwdata[3:0] != '0)) begin
            do_rw   <= req.pwdata[2] || req.pwdata[3];
            is_read <= req.pwdata[3];
            nack    <= req.pwdata[4];
            do_stop <= req.pwdata[1];
            q       <= '0;
            cnt     <= '0;
            k       <= '0;
            done    <= 1'b0;
            phase   <= req.pwdata[0] ? P_START :
                       (req.pwdata[2] || req.pwdata[3]) ? P_BYTE : P_STOP;
          end
          8'h04: txd <= req.pwdata[7:0];
          8'h0C: if (req.pwdata[2]) done <= 1'b0;
          8'h10: div <= req.pwdata[15:0];
          8'h14: inten <= req.pwdata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp.pready = 1'b1;
    unique case (req.paddr[7:0])
      8'h04:   rsp.prdata = {24'd0, txd};
      8'h08:   rsp.prdata = {24'd0, rxd};
      8'h0C:   rsp.prdata = {29'd0, done, ack, phase != P_IDLE};
      8'h10:   rsp.prdata = {16'd0, div};
      8'h14:   rsp.prdata = {31'd0, inten};
      default: rsp.prdata = '0;
    endcase
  end

  assign irq = done && inten;
endmodule
