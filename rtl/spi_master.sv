`timescale 1ns/1ps
// spi_master: SPI master on the peripheral bus (mode 0, MSB first).
//
// The platform has two; one, together with GPIO, drives a ZigBee
// transceiver. Writing DATA starts an 8-bit transfer: MOSI changes while
// SCK is low and MISO is sampled on each rising SCK edge; each SCK half
// period lasts DIV+1 clocks. At the end the received byte is in DATA, the
// done flag is set and irq is raised if enabled. Chip select is under
// software control (CS register), so several bytes can share one select.
// Registers (APB, no wait states):
//   0x00 DATA   w: byte to send (starts a transfer); r: last byte received
//   0x04 STATUS r: [0] busy, [1] done (w: 1 to [1] clears)
//   0x08 DIV    r/w: SCK half period - 1, in clocks (8 bits)
//   0x0C CS     r/w: [0] level of cs_n (reset 1)   0x10 INTEN r/w: [0]
// Mode 0, byte transfers and software chip select are this design's choices.
module spi_master
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  output logic     sck,
  output logic     mosi,
  input  logic     miso,
  output logic     cs_n,
  output logic     irq
);
  logic [7:0] div, cnt, sh, rx_sh;
  logic [3:0] nbit;
  logic       busy, done, inten;
  logic       wr;

  assign wr = req.psel && req.penable && req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= 8'd1; cnt <= '0; sh <= '0; rx_sh <= '0; nbit <= '0;
      busy <= 1'b0; done <= 1'b0; inten <= 1'b0; cs_n <= 1'b1; sck <= 1'b0;
    end else begin
      if (busy) begin
        if (cnt == div) begin
          cnt <= '0;
          if (!sck) begin
            sck <= 1'b1;                 // rising edge: sample MISO
            rx_sh <= {rx_sh[6:0], miso};
          end else begin
            sck  <= 1'b0;                // falling edge: next bit out
            sh   <= {sh[6:0], 1'b0};
            nbit <= nbit + 1'b1;
            if (nbit == 4'd7) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end else cnt <= cnt + 1'b1;
      end
      if (wr) begin
        unique case (req.paddr[7:0])
          8'h00: if (!busy) begin
            sh <= req.pwdata[7:0]; busy <= 1'b1; nbit <= '0; cnt <= '0;
            sck <= 1'b0; done <= 1'b0;
          end
          8'h04: if (req.pwdata[1]) done <= 1'b0;
          8'h08: div   <= req.pwdata[7:0];
          8'h0C: cs_n  <= req.pwdata[0];
          8'h10: inten <= req.pwdata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp.pready = 1'b1;
    unique case (req.paddr[7:0])
      8'h00:   rsp.prdata = {24'd0, rx_sh};
      8'h04:   rsp.prdata = {30'd0, done, busy};
      8'h08:   rsp.prdata = {24'd0, div};
      8'h0C:   rsp.prdata = {31'd0, cs_n};
      8'h10:   rsp.prdata = {31'd0, inten};
      default: rsp.prdata = '0;
    endcase
  end

  assign mosi = sh[7];
  assign irq  = done && inten;
endmodule
