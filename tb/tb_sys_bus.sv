`timescale 1ns/1ps
// tb_sys_bus: two masters against seven responder models. Checks address
// decoding (each slave answers with its own tag), error responses for
// unmapped addresses, that both masters are served when they request in the
// same cycle with master 0 first, and that each slave sees only its own
// requests.
module tb_sys_bus;
  import soc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"
  `TB_WATCHDOG(clk, 20000)

  sbus_req_t m_req [2];
  sbus_rsp_t m_rsp [2];
  sbus_req_t s_req [NSLV];
  sbus_rsp_t s_rsp [NSLV];
  int        seen  [NSLV];
  int        order [$];

  sys_bus #(.NM(2)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  // Responder models: answer two cycles after a request appears, with the
  // slave number in the top byte and the low address bits below.
  for (genvar s = 0; s < NSLV; s++) begin : g_slv
    logic [1:0] cnt;
    always_ff @(posedge clk) begin
      if (!s_req[s].valid) cnt <= '0;
      else if (cnt != 2'd2) cnt <= cnt + 1'b1;
    end
    assign s_rsp[s] = '{ready: s_req[s].valid && cnt == 2'd1, err: 1'b0,
                        rdata: {8'(s), s_req[s].addr[23:0]}};
    always @(posedge clk) if (s_req[s].valid && cnt == 2'd1) seen[s]++;
  end

  task automatic access(input int m, input logic [31:0] a, output logic [31:0] q, output logic e);
    @(negedge clk);
    m_req[m] = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0, be: 4'hF};
    forever begin #1; if (m_rsp[m].ready) break; @(negedge clk); end
    q = m_rsp[m].rdata; e = m_rsp[m].err;
    order.push_back(m);
    @(negedge clk);
    m_req[m] = '0;
  endtask

  logic [31:0] addrs [8] = '{32'h0000_0100, 32'h1000_0200, 32'h2000_0004, 32'h3000_0008,
                             32'h3000_1004, 32'h3000_2000, 32'h4003_0000, 32'h5000_0000};
  int expect_s [8] = '{S_MEM, S_BUF, S_SEC, S_RSTC, S_INTC, S_PMU, S_BRIDGE, -1};

  initial begin
    logic [31:0] q0, q1;
    logic e0, e1;
    m_req[0] = '0; m_req[1] = '0;
    foreach (seen[i]) seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      for (int m = 0; m < 2; m++) begin
        access(m, addrs[i], q0, e0);
        if (expect_s[i] < 0) chk(e0 && q0 == 0, $sformatf("unmapped %h: err=%b", addrs[i], e0));
        else chk(!e0 && q0 == {8'(expect_s[i]), addrs[i][23:0]},
                 $sformatf("m%0d addr %h -> %h", m, addrs[i], q0));
      end
    end
    for (int s = 0; s < NSLV; s++) chk(seen[s] == 2, $sformatf("slave %0d saw %0d", s, seen[s]));
    // simultaneous requests
    order.delete();
    fork
      access(0, 32'h0000_0040, q0, e0);
      access(1, 32'h1000_0080, q1, e1);
    join
    chk(order.size() == 2 && order[0] == 0 && order[1] == 1, "master 0 served first");
    chk(q0 == {8'(S_MEM), 24'h000040} && q1 == {8'(S_BUF), 24'h000080}, "both routed");
    finish_tb();
  end
endmodule
