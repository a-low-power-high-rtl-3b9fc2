// System-bus master tasks for testbenches: hold the request until a ready
// is seen, then drop it just after the clock edge that takes the ready. Expects clk, sreq (sbus_req_t), srsp (sbus_rsp_t).
task automatic sb_access(input logic we, input logic [31:0] a, input logic [31:0] d,
                         input logic [3:0] be, output logic [31:0] q, output logic err);
  @(negedge clk);
  sreq = '{valid: 1'b1, we: we, addr: a, wdata: d, be: be};
  forever begin
    #1;
    if (srsp.ready) break;
    @(negedge clk);
  end
  q   = srsp.rdata;
  err = srsp.err;
  @(posedge clk);
  #0.5 sreq = '0;
endtask

task automatic sb_write(input logic [31:0] a, input logic [31:0] d);
  logic [31:0] q;
  logic e;
  sb_access(1'b1, a, d, 4'hF, q, e);
endtask

task automatic sb_read(input logic [31:0] a, output logic [31:0] q);
  logic e;
  sb_access(1'b0, a, '0, 4'hF, q, e);
endtask
