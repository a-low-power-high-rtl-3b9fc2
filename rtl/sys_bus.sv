`timescale 1ns/1ps
// sys_bus: the 32-bit, 200 MHz system bus of the platform.
//
// Masters (index 0 = CPU, 1 = security DMA) hold a request until they get a
// ready. When the bus is idle a round-robin arbiter grants one master (the
// master granted last has the lowest priority, so a CPU polling a register
// cannot starve the DMA) and registers which slave the address decodes to;
// the request is then routed to that slave alone and the slave's response back
// to the granted master, until the slave returns ready. An address that maps
// to no slave is answered by the bus itself one cycle after the grant, with
// err set and zero read data. The arbitration and decode cost one cycle per
// transfer. The platform names the bus and its width and clock; arbitration
// policy, protocol and address map are this design's choices.
module sys_bus
  import soc_pkg::*;
#(
  parameter int unsigned NM = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  sbus_req_t m_req [NM],
  output sbus_rsp_t m_rsp [NM],
  output sbus_req_t s_req [NSLV],
  input  sbus_rsp_t s_rsp [NSLV]
);
  logic                    busy, err_resp;
  logic [$clog2(NM)-1:0]   owner;
  logic [$clog2(NSLV+1)-1:0] sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      err_resp <= 1'b0;
      owner    <= '0;
      sel      <= '0;
    end else if (!busy) begin
      for (int k = NM; k >= 1; k--) begin
        int i;
        i = (int'(owner) + k) % NM;
        if (m_req[i].valid) begin
          busy     <= 1'b1;
          owner    <= i[$clog2(NM)-1:0];
          sel      <= ($clog2(NSLV+1))'(sbus_decode(m_req[i].addr));
          err_resp <= (sbus_decode(m_req[i].addr) == NSLV);
        end
      end
    end else if (err_resp) begin
      busy     <= 1'b0;
      err_resp <= 1'b0;
    end else if (s_rsp[sel].ready) begin
      busy <= 1'b0;
    end
  end

  always_comb begin
    for (int s = 0; s < NSLV; s++) begin
      s_req[s] = '0;
      if (busy && !err_resp && sel == s) s_req[s] = m_req[owner];
    end
    for (int m = 0; m < NM; m++) begin
      m_rsp[m] = '0;
      if (busy && owner == m) begin
        if (err_resp) m_rsp[m] = '{ready: 1'b1, err: 1'b1, rdata: '0};
        else          m_rsp[m] = s_rsp[sel];
      end
    end
  end

  // A master must keep its request stable until it is answered.
  for (genvar m = 0; m < NM; m++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (busy && owner == m && !m_rsp[m].ready) |=> $stable(m_req[m]));
  end
endmodule
