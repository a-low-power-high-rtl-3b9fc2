`timescale 1ns/1ps
// sram_mem: single-port on-chip SRAM with a system-bus slave port.
//
// Used twice in the platform: as the 64 KB main memory and as the 16 KB SRAM
// buffer. The sizes are the platform's; the access timing is this design's:
// a request is answered one cycle after it is seen (ready pulses for one
// cycle, read data valid with it), byte enables select the bytes written.
// The address is taken modulo the memory size (word address = addr[.. :2]).
module sram_mem
  import soc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536
) (
  input  logic      clk,
  input  logic      rst_n,
  input  sbus_req_t req,
  output sbus_rsp_t rsp
);
  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] waddr;
  logic          busy;   // high in the cycle a response is returned
  logic [31:0]   rdata_q;

  assign waddr = req.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (req.valid && !busy) begin
      if (req.we) begin
        for (int b = 0; b < 4; b++)
          if (req.be[b]) mem[waddr][8*b +: 8] <= req.wdata[8*b +: 8];
      end
      rdata_q <= mem[waddr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= 1'b0;
    else        busy <= req.valid && !busy;
  end

  assign rsp.ready = busy;
  assign rsp.err   = 1'b0;
  assign rsp.rdata = rdata_q;
endmodule
