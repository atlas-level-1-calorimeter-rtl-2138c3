// ttc_source: testbench generator of a TTC line signal.
//
// Produces a biphase-mark stream: every bit cell of CELL_PS picoseconds
// starts with a transition and a '1' has a second transition at mid-cell.
// Cells alternate between channel A (value of a_in at the cell start) and
// channel B (value of b_in). The first cell is an A cell unless START_B is
// set. Outputs for checking: is_b and bit_val describe the current cell,
// cells counts completed cells, so cell k lasts from
// T0_PS + k*CELL_PS to T0_PS + (k+1)*CELL_PS.
module ttc_source #(
  parameter int unsigned CELL_PS = 12500,
  parameter int unsigned T0_PS   = 0,
  parameter bit          START_B = 1'b0
) (
  input  logic a_in,
  input  logic b_in,
  output logic ttc,
  output logic is_b,
  output logic bit_val,
  output int   cells
);
  timeunit 1ps;
  timeprecision 1ps;

  initial begin
    ttc     = 1'b0;
    is_b    = START_B;
    bit_val = 1'b0;
    cells   = 0;
    #(T0_PS);
    forever begin
      bit_val = is_b ? b_in : a_in;
      ttc     = ~ttc;
      #(CELL_PS / 2);
      if (bit_val) ttc = ~ttc;
      #(CELL_PS - CELL_PS / 2);
      cells++;
      is_b = ~is_b;
    end
  end
endmodule
