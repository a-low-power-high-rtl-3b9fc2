`timescale 1ns/1ps
// nor_ctrl: NOR flash read controller on the peripheral bus.
//
// Maps the flash into the controller's 64 KB bus window so the boot code
// can be read in place: a read of word address A performs two 16-bit flash
// reads, half-words 2A (low half) and 2A+1 (high half). For each, the
// controller drives the address with ce_n and oe_n low and waits WAIT+1
// clocks (the flash access time) before latching the data; pready is held
// low meanwhile. WAIT is set by the last word of the window (offset 0xFFFC,
// reset 3). Writes elsewhere are ignored: the flash is only read (we_n stays
// high). The platform says the controller reads the boot code from NOR
// flash; the 16-bit flash, the wait-state scheme and the window are this
// design's choices.
module nor_ctrl
  import soc_pkg::*;
#(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  apb_req_t      req,
  output apb_rsp_t      rsp,
  output logic [AW-1:0] nor_addr,
  input  logic [15:0]   nor_dq,
  output logic          nor_ce_n,
  output logic          nor_oe_n,
  output logic          nor_we_n
);
  typedef enum logic [1:0] {IDLE, RD_LO, RD_HI, DONE} state_e;
  state_e      state;
  logic [7:0]  wait_cfg, wcnt;
  logic [15:0] lo;
  logic [31:0] data;
  logic        acc, is_cfg;

  assign acc    = req.psel && req.penable;
  assign is_cfg = (req.paddr[15:2] == 14'h3FFF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; wait_cfg <= 8'd3; wcnt <= '0; lo <= '0; data <= '0;
      nor_addr <= '0; nor_ce_n <= 1'b1; nor_oe_n <= 1'b1;
    end else begin
      unique case (state)
        IDLE: if (acc) begin
          if (is_cfg) begin
            if (req.pwrite) wait_cfg <= req.pwdata[7:0];
          end else if (!req.pwrite) begin
            nor_addr <= AW'({req.paddr[15:2], 1'b0});
            nor_ce_n <= 1'b0;
            nor_oe_n <= 1'b0;
            wcnt     <= '0;
            state    <= RD_LO;
          end
        end
        RD_LO: if (wcnt == wait_cfg) begin
          lo       <= nor_dq;
          nor_addr <= nor_addr | AW'(1);
          wcnt     <= '0;
          state    <= RD_HI;
        end else wcnt <= wcnt + 1'b1;
        RD_HI: if (wcnt == wait_cfg) begin
          data     <= {nor_dq, lo};
          nor_ce_n <= 1'b1;
          nor_oe_n <= 1'b1;
          state    <= DONE;
        end else wcnt <= wcnt + 1'b1;
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // Config accesses and writes complete at once; flash reads when data is in.
  assign rsp.pready = !acc || is_cfg || req.pwrite || (state == DONE);
  assign rsp.prdata = is_cfg ? {24'd0, wait_cfg} : data;
  assign nor_we_n   = 1'b1;
endmodule
