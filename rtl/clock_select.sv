// clock_select: the two clock selection multiplexers of the CAM.
//
// The reference side picks one of the 16 processor clocks, or the local
// TTC-derived 40 MHz clock true, inverted or after the programmable delay.
// The variable side picks one of the 16 processor clocks or one of the three
// fibre-received clocks. As in the specification, each 16-way processor clock
// selection is built from a bank of four 4:1 multiplexers followed by a 4:1
// multiplexer, and a final 4:1 multiplexer chooses the source type.
//
// Interface: ref_sel / var_sel are the six-bit fields of the Reference Source
// and Variable Source registers (bits 5-4 type, bits 3-0 processor number).
// Timing: purely combinational; the outputs are clocks for the phase detector.
// The split of the processor number into bank (bits 3-2) and input (bits 1-0)
// is this design's choice.
module clock_select
  import cam_pkg::*;
(
  input  logic [N_PROC-1:0]  cpm_clk,     // processor clocks 0..15
  input  logic               ttc_clk,     // local TTC-derived 40 MHz clock
  input  logic               ttc_clk_dly, // local clock after the programmable delay
  input  logic [N_FIBRE-1:0] fibre_clk,   // fibre receivers 1..3
  input  src_sel_t           ref_sel,
  input  src_sel_t           var_sel,
  output logic               ref_clk,     // clock 1 of the phase detector
  output logic               var_clk      // clock 2 of the phase detector
);
  timeunit 1ns;
  timeprecision 1ps;

  // Two-level 16:1 selection: four 4:1 banks, then 4:1 across the banks.
  function automatic logic mux16(input logic [N_PROC-1:0] in, input logic [PROC_W-1:0] sel);
    logic [3:0] bank;
    for (int b = 0; b < 4; b++) bank[b] = in[4*b + int'(sel[1:0])];
    return bank[sel[3:2]];
  endfunction

  logic ref_cpm, var_cpm;

  always_comb begin
    ref_cpm = mux16(cpm_clk, ref_sel.proc);
    var_cpm = mux16(cpm_clk, var_sel.proc);

    unique case (ref_type_e'(ref_sel.kind))
      REF_CPM:     ref_clk = ref_cpm;
      REF_TTC:     ref_clk = ttc_clk;
      REF_TTC_INV: ref_clk = ~ttc_clk;
      REF_TTC_DLY: ref_clk = ttc_clk_dly;
      default:     ref_clk = ref_cpm;
    endcase

    unique case (var_type_e'(var_sel.kind))
      VAR_CPM:    var_clk = var_cpm;
      VAR_FIBRE1: var_clk = fibre_clk[0];
      VAR_FIBRE2: var_clk = fibre_clk[1];
      VAR_FIBRE3: var_clk = fibre_clk[2];
      default:    var_clk = var_cpm;
    endcase
  end

endmodule
