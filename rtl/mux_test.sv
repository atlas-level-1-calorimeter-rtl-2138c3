// mux_test: bench test mode for the clock selection path.
//
// Two jumpers (PL5, PL4) choose one of four modes, as tabulated in the
// specification:
//   0  normal: both selections and the fibre transmitter come from the
//      VME registers;
//   1  counter: a 6-bit counter that advances every STEP_CYCLES clocks
//      drives both six-bit selections, and the fibre transmitter is on;
//   2  both selections are 0, fibre transmitter off;
//   3  reference selection 0, variable selection 1, fibre transmitter off.
// The counter lets a test clock applied to each input in turn be watched on
// an oscilloscope. STEP_CYCLES = 40080 makes one step per millisecond at the
// 40.08 MHz logic clock.
//
// Ports: clk, rst_n, mode (jumpers), reg_ref_sel / reg_var_sel /
// reg_fibre_tx_en (register values), ref_sel / var_sel / fibre_tx_en (to the
// multiplexers and the fibre module), count (the test counter).
// Reading "cycling at 1 ms" as one counter step per millisecond, and letting
// the control register drive the transmitter in mode 0 (the mode table lists
// it as off there), are this design's choices.
module mux_test
  import cam_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 40080
) (
  input  logic       clk,
  input  logic       rst_n,
  input  muxtest_e   mode,
  input  src_sel_t   reg_ref_sel,
  input  src_sel_t   reg_var_sel,
  input  logic       reg_fibre_tx_en,
  output src_sel_t   ref_sel,
  output src_sel_t   var_sel,
  output logic       fibre_tx_en,
  output logic [5:0] count
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned PW = $clog2(STEP_CYCLES);

  logic [PW-1:0] presc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      presc <= '0;
      count <= '0;
    end else if (mode != MUXTEST_COUNTER) begin
      presc <= '0;
      count <= '0;
    end else if (presc == PW'(STEP_CYCLES - 1)) begin
      presc <= '0;
      count <= count + 1'b1;
    end else begin
      presc <= presc + 1'b1;
    end
  end

  always_comb begin
    unique case (mode)
      MUXTEST_NORMAL: begin
        ref_sel     = reg_ref_sel;
        var_sel     = reg_var_sel;
        fibre_tx_en = reg_fibre_tx_en;
      end
      MUXTEST_COUNTER: begin
        ref_sel     = count;
        var_sel     = count;
        fibre_tx_en = 1'b1;
      end
      MUXTEST_ZERO: begin
        ref_sel     = '0;
        var_sel     = '0;
        fibre_tx_en = 1'b0;
      end
      default: begin
        ref_sel     = '0;
        var_sel     = 6'd1;
        fibre_tx_en = 1'b0;
      end
    endcase
  end

endmodule
