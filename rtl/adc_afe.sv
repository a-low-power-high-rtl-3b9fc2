`timescale 1ns/1ps
// adc_afe: behavioural model of the analog part of the 12-bit SAR ADC.
//
// This is a simulation model of an analog macro, not synthesizable logic.
// The input voltage is given as a 16-bit fraction of the reference
// (vin = vin_frac / 65536 * VREF). While sample is high the sample-and-hold
// tracks the input; when sample falls it holds. The comparator output cmp
// is 1 when the held input is at or above the DAC level set by dac_code
// (dac_code / 4096 * VREF). The converter's resolution and single channel
// are the platform's; the input representation is this model's.
// Lint reports the held value as a latch: that is intended, it is the
// track-and-hold capacitor.
module adc_afe (
  input  logic        sample,
  input  logic [15:0] vin_frac,
  input  logic [11:0] dac_code,
  output logic        cmp
);
  logic [15:0] held;
  initial held = '0;
  always @(sample or vin_frac) begin
    if (sample) held = vin_frac;
  end
  assign cmp = (held >= {dac_code, 4'b0000});
endmodule
