// Peripheral-bus master tasks for testbenches: a setup phase, then an
// access phase held until pready. Expects clk, req (apb_req_t), rsp.
task automatic apb_write(input logic [19:0] a, input logic [31:0] d);
  @(negedge clk);
  req = '{psel: 1'b1, penable: 1'b0, pwrite: 1'b1, paddr: a, pwdata: d};
  @(negedge clk);
  req.penable = 1'b1;
  #1;
  while (!rsp.pready) begin @(negedge clk); #1; end
  @(posedge clk);
  #1 req = '0;
endtask

task automatic apb_read(input logic [19:0] a, output logic [31:0] d);
  @(negedge clk);
  req = '{psel: 1'b1, penable: 1'b0, pwrite: 1'b0, paddr: a, pwdata: '0};
  @(negedge clk);
  req.penable = 1'b1;
  #1;
  while (!rsp.pready) begin @(negedge clk); #1; end
  d = rsp.prdata;
  @(posedge clk);
  #1 req = '0;
endtask
