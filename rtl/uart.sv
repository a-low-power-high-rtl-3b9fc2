`timescale 1ns/1ps
// uart: asynchronous serial port (8 data bits, no parity, 1 stop bit).
//
// The platform has three; they connect a USB bridge, an RS232 level shifter
// and a Bluetooth module. DIV sets the bit time in clocks (reset value 434,
// 115200 baud from 50 MHz). Writing DATA while the transmitter is idle sends
// one byte, LSB first, framed by a start and a stop bit. The receiver
// synchronises rx, waits half a bit after a falling edge to confirm the
// start bit, samples each data bit in its middle and accepts the byte if
// the stop bit is high; a byte that arrives before the previous one was read
// sets the overrun flag and is dropped. irq = received byte waiting AND its
// interrupt enable.
// Registers (APB, no wait states):
//   0x00 DATA   w: byte to send; r: received byte (reading clears rx_valid)
//   0x04 STATUS r: [0] tx busy, [1] rx_valid, [2] overrun (w: 1 to [2] clears)
//   0x08 DIV    r/w: clocks per bit (16 bits)
//   0x0C INTEN  r/w: [0] receive interrupt enable
// Frame format, single-byte buffers and layout are this design's choices.
module uart
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  input  logic     rx,
  output logic     tx,
  output logic     irq
);
  logic [15:0] div;
  logic        inten;
  logic        wr, rd;
  // transmitter
  logic [9:0]  tx_sh;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  logic        tx_busy;
  // receiver
  logic [1:0]  rx_sync;
  logic        rx_busy;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;
  logic [7:0]  rx_sh, rx_data;
  logic        rx_valid, overrun;

  assign wr = req.psel && req.penable && req.pwrite;
  assign rd = req.psel && req.penable && !req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= 16'd434; inten <= 1'b0;
      tx_sh <= '1; tx_bits <= '0; tx_cnt <= '0; tx_busy <= 1'b0;
      rx_sync <= '1; rx_busy <= 1'b0; rx_bits <= '0; rx_cnt <= '0;
      rx_sh <= '0; rx_data <= '0; rx_valid <= 1'b0; overrun <= 1'b0;
    end else begin
      // ---- transmit
      if (tx_busy) begin
        if (tx_cnt == div - 1'b1) begin
          tx_cnt <= '0;
          tx_sh  <= {1'b1, tx_sh[9:1]};
          if (tx_bits == 4'd9) tx_busy <= 1'b0;
          tx_bits <= tx_bits + 1'b1;
        end else begin
          tx_cnt <= tx_cnt + 1'b1;
        end
      end else if (wr && req.paddr[7:0] == 8'h00) begin
        tx_sh   <= {1'b1, req.pwdata[7:0], 1'b0};
        tx_busy <= 1'b1;
        tx_bits <= '0;
        tx_cnt  <= '0;
      end
      // ---- receive
      rx_sync <= {rx_sync[0], rx};
      if (!rx_busy) begin
        if (!rx_sync[1]) begin
          rx_busy <= 1'b1;
          rx_cnt  <= '0;
          rx_bits <= '0;
        end
      end else if (rx_bits == 4'd0) begin
        // confirm start bit half a bit after the edge
        if (rx_cnt == (div >> 1)) begin
          rx_cnt <= '0;
          if (rx_sync[1]) rx_busy <= 1'b0;
          else            rx_bits <= 4'd1;
        end else rx_cnt <= rx_cnt + 1'b1;
      end else if (rx_cnt == div - 1'b1) begin
        rx_cnt <= '0;
        if (rx_bits <= 4'd8) begin
          rx_sh   <= {rx_sync[1], rx_sh[7:1]};
          rx_bits <= rx_bits + 1'b1;
        end else begin
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin
            if (rx_valid && !(rd && req.paddr[7:0] == 8'h00)) overrun <= 1'b1;
            else begin
              rx_data  <= rx_sh;
              rx_valid <= 1'b1;
            end
          end
        end
      end else rx_cnt <= rx_cnt + 1'b1;
      // ---- registers
      if (rd && req.paddr[7:0] == 8'h00 &&
          !(rx_busy && rx_bits == 4'd9 && rx_cnt == div - 1'b1 && rx_sync[1]))
        rx_valid <= 1'b0;
      if (wr) begin
        unique case (req.paddr[7:0])
          8'h04: if (req.pwdata[2]) overrun <= 1'b0;
          8'h08: div   <= req.pwdata[15:0];
          8'h0C: inten <= req.pwdata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp.pready = 1'b1;
    unique case (req.paddr[7:0])
      8'h00:   rsp.prdata = {24'd0, rx_data};
      8'h04:   rsp.prdata = {29'd0, overrun, rx_valid, tx_busy};
      8'h08:   rsp.prdata = {16'd0, div};
      8'h0C:   rsp.prdata = {31'd0, inten};
      default: rsp.prdata = '0;
    endcase
  end

  assign tx  = tx_sh[0];
  assign irq = rx_valid && inten;
endmodule
