// phase_interp_model: behavioural model of a periphery loop's phase
// selector and interpolator, for simulation only (not synthesizable).
//
// From one reference clock it makes four sampling clocks 90 degrees
// apart, all delayed by code * PERIOD_PS / 2**PHASE_W picoseconds, so the
// PHASE_W-bit code moves them over one full clock period in equal steps.
// A real interpolator mixes neighbouring DLL phases; this model only
// reproduces the resulting delay, as an ideal transport delay, and a code
// change takes effect on the next reference edge.
`timescale 1ps/1ps
module phase_interp_model #(
  parameter int PERIOD_PS = 1000,
  parameter int PHASE_W   = 6
) (
  input  logic               ref_clk,
  input  logic [PHASE_W-1:0] code,
  output logic               clk_0,
  output logic               clk_90,
  output logic               clk_180,
  output logic               clk_270
);
  initial begin
    clk_0 = 1'b0; clk_90 = 1'b0; clk_180 = 1'b0; clk_270 = 1'b0;
  end
  // each reference edge spawns four delayed copies of itself (transport delay)
  always @(ref_clk) begin
    automatic logic v = ref_clk;
    automatic int   d = ((int'(code) * PERIOD_PS) >> PHASE_W) + 1;
    fork
      begin #(d)                 clk_0   = v; end
      begin #(d + PERIOD_PS/4)   clk_90  = v; end
      begin #(d + PERIOD_PS/2)   clk_180 = v; end
      begin #(d + 3*PERIOD_PS/4) clk_270 = v; end
    join_none
  end
endmodule
