// ttc_delay: behavioural model of the MC100EP195 programmable delay chip that
// optionally delays the local TTC-derived clock. It is not synthesizable.
//
// The delay is BASE_PS + code * STEP_PS picoseconds, i.e. 2.2 ns to 12.2 ns in 10 ps
// steps for the 10-bit code held in the TTC Delay register, as the
// specification gives. The model is a transport delay: every edge of clk_in
// reappears on clk_out after the delay that applies when the edge arrives.
// The chip's latch-enable and cascade pins are not modelled; the code is
// taken to be static while a measurement runs.
module ttc_delay #(
  parameter int unsigned W          = 10,
  parameter int unsigned BASE_PS    = 2200,
  parameter int unsigned STEP_PS    = 10
) (
  input  logic         clk_in,
  input  logic [W-1:0] code,
  output logic         clk_out
);
  timeunit 1ps;
  timeprecision 1ps;


  logic    q;
  int unsigned d;   // delay in ps

  initial begin
    q = 1'b0;
  end

  always_comb d = BASE_PS + int'(code) * STEP_PS;

  always begin
    @(clk_in);
    begin
      automatic logic v = clk_in;
      fork
        begin #(d) q = v; end
      join_none
    end
  end

  assign clk_out = q;

endmodule
