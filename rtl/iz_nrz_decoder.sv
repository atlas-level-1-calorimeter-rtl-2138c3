// iz_nrz_decoder: extracts the data bits from the raw TTC signal.
//
// A flip-flop clocked by the delayed recovered 80 MHz clock samples the TTC
// signal once per 12.5 ns bit cell, after the possible mid-cell data
// transition and before the next cell boundary. In the biphase-mark code a
// '1' has two transitions per cell and a '0' one, so successive samples are
// equal for a '1' and differ for a '0': the sampled stream is in
// "invert on zero" (IZ) form. A second flip-flop on the undelayed 80 MHz
// clock keeps the previous IZ sample, and the data bit is 1 when the two
// samples agree, which turns IZ into NRZ.
//
// Ports: ttc_in (raw TTC), clk_sample (delayed 80 MHz clock, samples the TTC
// line), clk80 (recovered 80 MHz clock of the decoding logic), rst_n
// (asynchronous reset), iz (IZ sample), nrz (decoded bit, valid at each
// clk80 rising edge; combinational from the two flip-flops).
// Structure and rule follow the specification; the reset is this design's.
module iz_nrz_decoder (
  input  logic ttc_in,
  input  logic clk_sample,
  input  logic clk80,
  input  logic rst_n,
  output logic iz,
  output logic nrz
);
  timeunit 1ns;
  timeprecision 1ps;

  logic iz_prev;

  // Sampling flip-flop (a PECL part on the board).
  always_ff @(posedge clk_sample or negedge rst_n) begin
    if (!rst_n) iz <= 1'b0;
    else        iz <= ttc_in;
  end

  // Previous sample, held inside the programmable logic.
  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) iz_prev <= 1'b0;
    else        iz_prev <= iz;
  end

  // Equal successive samples encode a '1'.
  assign nrz = ~(iz ^ iz_prev);

endmodule
