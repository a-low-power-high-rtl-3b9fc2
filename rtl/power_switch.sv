`timescale 1ns/1ps
// power_switch: behavioural model of the header switches of the CPU and
// main-memory power domain.
//
// This is a simulation model of an analog part: a row of header
// switches between VDD (1.2 V) and the gated domain's virtual supply, all
// driven by the active-high Sleep signal. The virtual supply collapses as
// soon as Sleep rises and is reported good (vdd_ok) RAMP_NS after Sleep
// falls. The switch arrangement is the platform's; the ramp time is this
// model's assumption. Lint reports vdd_ok as a latch: it is state of the
// model (the supply stays as it is until Sleep changes), not logic.
module power_switch #(
  parameter int unsigned RAMP_NS = 50
) (
  input  logic sleep,
  output logic vdd_ok
);
  initial vdd_ok = 1'b1;
  always @(sleep) begin
    if (sleep) vdd_ok = 1'b0;
  end
  always @(negedge sleep) begin
    #(RAMP_NS);
    if (!sleep) vdd_ok = 1'b1;
  end
endmodule
