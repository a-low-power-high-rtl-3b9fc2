`timescale 1ns/1ps
// gpio: general-purpose I/O port on the peripheral bus.
//
// Each of the W pins is an output when its DIR bit is 1 (driven from OUT)
// and an input otherwise. Inputs pass a two-flop synchroniser; a rising edge
// on an input whose interrupt is enabled sets its bit in INTSTAT, and irq is
// high while any such bit is set.
// Registers (APB, no wait states):
//   0x00 OUT r/w   0x04 DIR r/w   0x08 IN r   0x0C INTEN r/w
//   0x10 INTSTAT r; w: 1 clears
// The platform's example sets direction with an 8-bit mask (0xFF for an LCD
// bus), hence W = 8; the edge interrupt and layout are this design's.
module gpio
  import soc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  apb_req_t     req,
  output apb_rsp_t     rsp,
  input  logic [W-1:0] gpio_i,
  output logic [W-1:0] gpio_o,
  output logic [W-1:0] gpio_oe,
  output logic         irq
);
  logic [W-1:0] dout, dir, s1, s2, s3, inten, istat;
  logic         wr;

  assign wr = req.psel && req.penable && req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0; dir <= '0; s1 <= '0; s2 <= '0; s3 <= '0;
      inten <= '0; istat <= '0;
    end else begin
      s1 <= gpio_i;
      s2 <= s1;
      s3 <= s2;
      istat <= istat | (s2 & ~s3 & inten & ~dir);
      if (wr) begin
        unique case (req.paddr[7:0])
          8'h00: dout  <= req.pwdata[W-1:0];
          8'h04: dir   <= req.pwdata[W-1:0];
          8'h0C: inten <= req.pwdata[W-1:0];
          8'h10: istat <= (istat | (s2 & ~s3 & inten & ~dir)) & ~req.pwdata[W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp.pready = 1'b1;
    unique case (req.paddr[7:0])
      8'h00:   rsp.prdata = 32'(dout);
      8'h04:   rsp.prdata = 32'(dir);
      8'h08:   rsp.prdata = 32'(s2);
      8'h0C:   rsp.prdata = 32'(inten);
      8'h10:   rsp.prdata = 32'(istat);
      default: rsp.prdata = '0;
    endcase
  end

  assign gpio_o  = dout;
  assign gpio_oe = dir;
  assign irq     = |istat;
endmodule
