// phase_adc_model: testbench model of the analog back end of the phase
// measurement, i.e. the low-pass filter, the differential pre-amplifier and
// the 10-bit serial ADC.
//
// The filter is modelled as an exact average: from the falling edge of
// cs_n the model integrates the time the phase pulse is high for CONV_NS
// nanoseconds (the conversion time). It then converts
//   code = 512 + (duty - 0.5) * GAIN * 1024, clamped to 0..1023,
// so that a 50 % duty cycle (clocks in phase) gives 0x200 and, with GAIN = 2,
// one count is 1/1024 of a clock period. After the conversion dout goes high
// (end of conversion); each following falling edge of sclk presents the next
// bit, D9 first, then two zero sub-bits. dout is low while cs_n is high.
module phase_adc_model #(
  parameter int unsigned CONV_NS = 13000,
  parameter real         GAIN    = 2.0
) (
  input  logic pulse,
  input  logic cs_n,
  input  logic sclk,
  output logic dout
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime     t_last, high_time, t_start;
  logic        integrating;
  logic [11:0] shreg;
  int          code;

  initial begin
    dout        = 1'b0;
    integrating = 1'b0;
    high_time   = 0.0;
    t_last      = 0.0;
    t_start     = 0.0;
    shreg       = '0;
    code        = 0;
  end

  // Integrate the high time of the pulse train while converting.
  always @(pulse) begin
    if (integrating && !pulse) high_time = high_time + ($realtime - t_last);
    t_last = $realtime;
  end

  always @(negedge cs_n) begin
    real duty;
    dout        = 1'b0;
    high_time   = 0.0;
    t_start     = $realtime;
    t_last      = $realtime;
    integrating = 1'b1;
    #(CONV_NS * 1ns);
    if (pulse) high_time = high_time + ($realtime - t_last);
    integrating = 1'b0;
    duty = high_time / ($realtime - t_start);
    code = int'(512.0 + (duty - 0.5) * GAIN * 1024.0);
    if (code < 0)    code = 0;
    if (code > 1023) code = 1023;
    shreg = {code[9:0], 2'b00};
    if (!cs_n) dout = 1'b1;
  end

  always @(negedge sclk) begin
    if (!cs_n && !integrating) begin
      dout  = shreg[11];
      shreg = {shreg[10:0], 1'b0};
    end
  end

  always @(posedge cs_n) dout = 1'b0;

endmodule
