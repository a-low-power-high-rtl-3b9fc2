`timescale 1ns/1ps
// apb_bridge: bridge from the 200 MHz system bus to the 50 MHz peripheral bus.
//
// The peripheral clock is the system clock gated down to one pulse every
// RATIO cycles; peri_tick is high in the system-clock cycle that ends with a
// peripheral-clock edge. The bridge therefore runs on the system clock and
// changes its peripheral-bus outputs only at such edges, so they are stable
// for a whole peripheral clock period. A system-bus request is
// presented, at the next peripheral edge, as a setup phase (psel) and an access phase (psel, penable) that
// lasts until pready; the read data are returned with a one-cycle ready on
// the system bus. Only whole 32-bit words are transferred (byte enables are
// not passed on). The platform gives the bridge and the two bus clocks; the
// protocol details are this design's.
module apb_bridge
  import soc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      peri_tick,
  input  sbus_req_t s_req,
  output sbus_rsp_t s_rsp,
  output apb_req_t  p_req,
  input  apb_rsp_t  p_rsp
);
  typedef enum logic [2:0] {IDLE, WAIT_SETUP, SETUP, ACCESS, RESP} state_e;
  state_e      state;
  logic [31:0] rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      p_req   <= '0;
      rdata_q <= '0;
    end else begin
      unique case (state)
        IDLE: if (s_req.valid) state <= WAIT_SETUP;
        WAIT_SETUP: if (peri_tick) begin
          // the system-bus master holds its request until answered
          p_req <= '{psel: 1'b1, penable: 1'b0, pwrite: s_req.we,
                     paddr: s_req.addr[19:0], pwdata: s_req.wdata};
          state <= SETUP;
        end
        SETUP: if (peri_tick) begin
          p_req.penable <= 1'b1;
          state         <= ACCESS;
        end
        ACCESS: if (peri_tick && p_rsp.pready) begin
          p_req.psel    <= 1'b0;
          p_req.penable <= 1'b0;
          rdata_q       <= p_rsp.prdata;
          state         <= RESP;
        end
        RESP: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign s_rsp.ready = (state == RESP);
  assign s_rsp.err   = 1'b0;
  assign s_rsp.rdata = rdata_q;

  a_apb_setup: assert property (@(posedge clk) disable iff (!rst_n)
    (p_req.penable |-> p_req.psel));
endmodule
