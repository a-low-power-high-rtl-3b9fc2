`timescale 1ns/1ps
// tb_peri_bus: drives every slot address and checks that psel reaches only
// the addressed peripheral and that its pready/prdata come back; an empty
// slot answers ready with zero.
module tb_peri_bus;
  import soc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `TB_WATCHDOG(clk, 1000)

  apb_req_t m_req;
  apb_rsp_t m_rsp;
  apb_req_t p_req [NPERI];
  apb_rsp_t p_rsp [NPERI];

  peri_bus #(.NP(NPERI)) dut (.m_req, .m_rsp, .p_req, .p_rsp);

  for (genvar i = 0; i < NPERI; i++) begin : g_p
    assign p_rsp[i] = '{pready: (i % 3) != 0 || p_req[i].penable, prdata: 32'hA000_0000 + 32'(i)};
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      m_req = '{psel: 1'b1, penable: 1'b1, pwrite: 1'b0, paddr: {4'(s), 16'h0010}, pwdata: '0};
      #1;
      for (int i = 0; i < NPERI; i++)
        chk(p_req[i].psel == (i == s) && p_req[i].paddr == m_req.paddr,
            $sformatf("slot %0d: psel[%0d]=%b", s, i, p_req[i].psel));
      if (s < NPERI) chk(m_rsp.prdata == 32'hA000_0000 + 32'(s) && m_rsp.pready, $sformatf("slot %0d data", s));
      else           chk(m_rsp.prdata == 0 && m_rsp.pready, "empty slot");
      @(posedge clk);
    end
    m_req = '{psel: 1'b1, penable: 1'b0, pwrite: 1'b0, paddr: {4'd3, 16'h0}, pwdata: '0};
    #1 chk(!m_rsp.pready, "wait state of slot 3 passed back");
    m_req = '0;
    #1;
    for (int i = 0; i < NPERI; i++) chk(!p_req[i].psel, "no select when idle");
    finish_tb();
  end
endmodule
