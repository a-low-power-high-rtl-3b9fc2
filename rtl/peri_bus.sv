`timescale 1ns/1ps
// peri_bus: select decoding and read-data return of the peripheral bus.
//
// The bridge's request is broadcast to all peripherals; psel is passed only
// to the slot addressed by paddr[19:16] (64 KB per peripheral). The selected
// slot's pready and prdata are returned; an empty slot answers at once with
// zero. Purely combinational. Slot numbering is in soc_pkg.
module peri_bus
  import soc_pkg::*;
#(
  parameter int unsigned NP = NPERI
) (
  input  apb_req_t m_req,
  output apb_rsp_t m_rsp,
  output apb_req_t p_req [NP],
  input  apb_rsp_t p_rsp [NP]
);
  logic [3:0] idx;
  assign idx = m_req.paddr[19:16];

  always_comb begin
    m_rsp = '{pready: 1'b1, prdata: '0};
    for (int i = 0; i < NP; i++) begin
      p_req[i]      = m_req;
      p_req[i].psel = m_req.psel && (idx == i);
      if (idx == i) m_rsp = p_rsp[i];
    end
  end
endmodule
