// ttc_clock_recovery: behavioural model of the PECL circuit that recovers the
// 80 MHz clock from the TTC signal. It is not synthesizable logic: the real
// part is built from an LVPECL exclusive-or, an RC delay element, a D-type
// flip-flop and a delay line, and this model reproduces it with delays.
//
// The TTC signal is a biphase-mark stream at 160 Mbaud: every 12.5 ns bit
// cell starts with a transition, and a '1' has a second transition in its
// middle. A transition detector (XOR of the signal with a copy delayed by
// XOR_DELAY_PS) makes a short pulse at every transition. The pulse clocks a
// D-type flip-flop whose D input is tied high; its output, delayed by
// RESET_DELAY_PS, resets it. The flip-flop therefore makes a pulse RESET_DELAY_PS
// wide and then stays blind for a further RESET_DELAY_PS, a dead time that
// covers the mid-cell data transition, so it fires once per cell at 80 MHz.
// If it starts on a mid-cell transition it falls back onto the cell
// boundaries at the next '0'.
//
// Ports: ttc_in (raw TTC), clock80 (recovered clock), clock80_sample
// (clock80 through the sampling delay line that feeds the data flip-flop).
// Delays are in picoseconds. XOR_DELAY_PS = 3 ns and RESET_DELAY_PS = 4 ns
// are the specification's values; SAMPLE_DELAY_PS, which places the data
// sample between the mid-cell and the next boundary transition, is this
// design's choice.
module ttc_clock_recovery #(
  parameter int unsigned XOR_DELAY_PS    = 3000,
  parameter int unsigned RESET_DELAY_PS  = 4000,
  parameter int unsigned SAMPLE_DELAY_PS = 9000
) (
  input  logic ttc_in,
  output logic clock80,
  output logic clock80_sample
);
  timeunit 1ps;
  timeprecision 1ps;


  logic ttc_dly;
  logic trans;
  logic mono_q;
  logic mono_rst;
  logic smp_clk;

  initial begin
    ttc_dly = 1'b0;
    mono_q = 1'b0;
    mono_rst = 1'b0;
    smp_clk = 1'b0;
  end

  // Delay element of the transition detector. Each edge is scheduled on
  // its own (a transport delay), so pulses shorter than the delay pass.
  always begin
    @(ttc_in);
    begin
      automatic logic v = ttc_in;
      fork
        begin #(XOR_DELAY_PS) ttc_dly = v; end
      join_none
    end
  end

  assign trans = ttc_in ^ ttc_dly;

  // Monostable: D-type with D = 1, reset by its own delayed output.
  always @(posedge trans or posedge mono_rst) begin
    if (mono_rst) mono_q <= 1'b0;
    else          mono_q <= 1'b1;
  end

  always begin
    @(mono_q);
    begin
      automatic logic v = mono_q;
      fork
        begin #(RESET_DELAY_PS) mono_rst = v; end
      join_none
    end
  end

  always begin
    @(mono_q);
    begin
      automatic logic v = mono_q;
      fork
        begin #(SAMPLE_DELAY_PS) smp_clk = v; end
      join_none
    end
  end

  assign clock80        = mono_q;
  assign clock80_sample = smp_clk;

endmodule
