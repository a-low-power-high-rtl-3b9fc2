`timescale 1ns/1ps
// intc: interrupt controller of the system controller (always-on).
//
// Collects up to 32 level interrupt lines. A line is pending when it is
// high and enabled. Among the pending lines the one with the highest
// programmable priority (4 bits, larger wins, the lower line number on a
// tie) is presented as the interrupt identity; irq, to the core's IRQ input,
// and wake, to the PMU, are high while any line is pending. Sources are
// registered once on entry and irq/id are registered, so a new interrupt
// reaches irq two cycles after its line rises.
// Registers (system bus, one-cycle response):
//   0x000 RAW     r: the 32 lines as sampled
//   0x004 ENABLE  r/w: enable per line (reset 0)
//   0x008 ID      r: [31] an interrupt is pending, [4:0] its line number
//   0x080+4*i PRIO[i] r/w: [3:0] priority of line i (reset 0)
// The platform gives 32 lines, programmable priority and the wake-up path;
// priority width, tie rule and layout are this design's.
module intc
  import soc_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] src,
  input  sbus_req_t    req,
  output sbus_rsp_t    rsp,
  output logic         irq,
  output logic         wake,
  output logic [4:0]   irq_id
);
  logic [N-1:0] src_q, enable;
  logic [3:0]   prio [N];
  logic         resp;
  logic [31:0]  rdata;
  logic         best_v;
  logic [4:0]   best_id;
  logic [3:0]   best_p;

  always_comb begin
    best_v  = 1'b0;
    best_id = '0;
    best_p  = '0;
    for (int i = 0; i < N; i++) begin
      if (src_q[i] && enable[i] && (!best_v || prio[i] > best_p)) begin
        best_v  = 1'b1;
        best_id = 5'(i);
        best_p  = prio[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q  <= '0;
      enable <= '0;
      for (int i = 0; i < N; i++) prio[i] <= '0;
      resp   <= 1'b0;
      rdata  <= '0;
      irq    <= 1'b0;
      irq_id <= '0;
    end else begin
      src_q  <= src;
      irq    <= best_v;
      irq_id <= best_id;
      resp   <= req.valid && !resp;
      if (req.valid && !resp) begin
        if (req.we) begin
          if (req.addr[7:0] == 8'h04) enable <= req.wdata[N-1:0];
          if (req.addr[7] && 32'(req.addr[6:2]) < N) prio[req.addr[6:2]] <= req.wdata[3:0];
        end else begin
          unique case (1'b1)
            req.addr[7]:            rdata <= {28'd0, prio[req.addr[6:2]]};
            req.addr[7:0] == 8'h00: rdata <= 32'(src_q);
            req.addr[7:0] == 8'h04: rdata <= 32'(enable);
            req.addr[7:0] == 8'h08: rdata <= {best_v, 26'd0, best_id};
            default:                rdata <= '0;
          endcase
        end
      end
    end
  end

  assign wake      = irq;
  assign rsp.ready = resp;
  assign rsp.err   = 1'b0;
  assign rsp.rdata = rdata;
endmodule
