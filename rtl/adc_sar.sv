`timescale 1ns/1ps
// adc_sar: control logic and registers of the 12-bit SAR ADC.
//
// Writing 1 to CTRL starts a conversion: the analog front end samples the
// input for SAMPLE_CYCLES clocks, then the successive-approximation register
// decides one bit per clock, MSB first: it sets the trial bit, and keeps it
// if the comparator reports the held input at or above the DAC level. After
// 12 decisions the result is in DATA, done is set and irq is raised if
// enabled, so a conversion takes SAMPLE_CYCLES + 12 clocks.
// Registers (APB, no wait states):
//   0x00 CTRL   w: [0] start   0x04 STATUS r: [0] busy, [1] done (w: 1 to [1] clears)
//   0x08 DATA   r: [11:0] result   0x0C INTEN r/w: [0]
// The single channel and 12-bit resolution are the platform's; sampling
// time, one decision per clock and layout are this design's choices.
module adc_sar
  import soc_pkg::*;
#(
  parameter int unsigned NBITS         = 12,
  parameter int unsigned SAMPLE_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  apb_req_t         req,
  output apb_rsp_t         rsp,
  output logic             sample,
  output logic [NBITS-1:0] dac_code,
  input  logic             cmp,
  output logic             irq
);
  logic [NBITS-1:0] result, trial;
  logic [$clog2(NBITS)-1:0] bitpos;
  logic [$clog2(SAMPLE_CYCLES+1)-1:0] scnt;
  logic busy, converting, done, inten, wr;

  assign wr = req.psel && req.penable && req.pwrite;
  assign dac_code = result | trial;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0; trial <= '0; bitpos <= '0; scnt <= '0;
      busy <= 1'b0; converting <= 1'b0; done <= 1'b0; inten <= 1'b0; sample <= 1'b0;
    end else begin
      if (busy && !converting) begin
        if (scnt == ($bits(scnt))'(SAMPLE_CYCLES - 1)) begin
          sample     <= 1'b0;
          converting <= 1'b1;
          bitpos     <= ($bits(bitpos))'(NBITS - 1);
          trial      <= {1'b1, {(NBITS-1){1'b0}}};
        end else scnt <= scnt + 1'b1;
      end else if (converting) begin
        if (cmp) result <= result | trial;
        trial <= trial >> 1;
        if (bitpos == '0) begin
          converting <= 1'b0;
          busy       <= 1'b0;
          done       <= 1'b1;
        end else bitpos <= bitpos - 1'b1;
      end
      if (wr) begin
        unique case (req.paddr[7:0])
          8'h00: if (req.pwdata[0] && !busy) begin
            busy <= 1'b1; sample <= 1'b1; scnt <= '0; result <= '0;
            trial <= '0; done <= 1'b0;
          end
          8'h04: if (req.pwdata[1]) done <= 1'b0;
          8'h0C: inten <= req.pwdata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp.pready = 1'b1;
    unique case (req.paddr[7:0])
      8'h04:   rsp.prdata = {30'd0, done, busy};
      8'h08:   rsp.prdata = 32'(result);
      8'h0C:   rsp.prdata = {31'd0, inten};
      default: rsp.prdata = '0;
    endcase
  end

  assign irq = done && inten;
endmodule
