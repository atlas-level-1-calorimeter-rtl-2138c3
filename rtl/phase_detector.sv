// phase_detector: edge-triggered exclusive-or phase detector without a dead
// zone around zero phase.
//
// Clock 1 drives a two-stage twisted-ring (Johnson) counter, which divides it
// by four. The last stage of that counter is resampled by clock 2, first on
// clock 2's falling edge (to keep away from metastability at zero phase) and
// then on its rising edge. The XOR of the divided clock 1 and its resampled
// copy is a 20 MHz pulse train whose mean value is the phase measurement.
// With in-phase 40 MHz clocks the two XOR inputs are in quadrature and the
// duty cycle is 50 %; it rises linearly to 75 % as clock 2 lags by just under
// half a period and wraps to 25 % where clock 1's rising edge meets clock 2's
// falling edge. Only the edge times matter, not the mark-space ratio of
// clock 1; the wrap point depends on clock 2's mark-space ratio.
//
// Interface: clk1 (reference), clk2 (variable), rst_n asynchronous reset of
// the flip-flops, pulse output to the analog low-pass filter.
// The structure follows the specification's phase detector drawing; the
// reset is this design's addition so that simulation starts from a known
// state (the hardware needs none: the counter is self-starting).
module phase_detector (
  input  logic clk1,
  input  logic clk2,
  input  logic rst_n,
  output logic pulse
);
  timeunit 1ns;
  timeprecision 1ps;

  logic div_a, div_b;       // divide-by-4 ring on clock 1
  logic smp_fall, smp_rise; // clock 2 resampling stages

  always_ff @(posedge clk1 or negedge rst_n) begin
    if (!rst_n) begin
      div_a <= 1'b0;
      div_b <= 1'b0;
    end else begin
      div_a <= ~div_b;
      div_b <= div_a;
    end
  end

  always_ff @(negedge clk2 or negedge rst_n) begin
    if (!rst_n) smp_fall <= 1'b0;
    else        smp_fall <= div_b;
  end

  always_ff @(posedge clk2 or negedge rst_n) begin
    if (!rst_n) smp_rise <= 1'b0;
    else        smp_rise <= smp_fall;
  end

  assign pulse = div_b ^ smp_rise;

endmodule
