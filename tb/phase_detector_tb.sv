// phase_detector_tb: sweeps the delay of clock 2 behind clock 1 across a
// whole 25 ns period in 1 ns steps and measures the duty cycle of the phase
// pulses. The expected value follows from the edge timing alone: the
// resampled copy lags the divided clock 1 by d = tau + T for tau < T/2 and by
// d = tau for tau > T/2, and the XOR is high for d/(2T) of the time. That
// gives 50 % at zero phase, a linear rise with slope 1/(2T), and a wrap from
// 75 % to 25 % at tau = T/2. The sweep is repeated with clock 1 at a 30 %
// mark-space ratio, which must not change the result, and with clock 2 at a
// 30 % mark-space ratio. Clock 2 is resampled on its falling edge first, so
// for a clock 2 high for h the lag becomes d = ((tau + h) mod T) + T - h:
// zero phase still gives 50 %, but the wrap moves to tau = T - h, where the
// rising edge of clock 1 meets the falling edge of clock 2. The pulse rate
// (20 MHz, two pulses per 100 ns) is checked as well.
module phase_detector_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T = 25.0;

  logic clk1 = 0, clk2 = 0, rst_n = 0;
  logic pulse;
  int checks = 0, failures = 0;
  realtime tau, hi1, hi2;
  realtime t_last, high_time;
  int rises;
  logic measuring = 0;

  phase_detector dut (.*);

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clock generators: clk1 rises at k*T and is high for hi1, clk2 rises at
  // k*T + tau and is high for hi2.
  logic clk_base = 0;
  initial forever begin
    clk_base = 1; #(T / 2); clk_base = 0; #(T / 2);
  end
  always @(posedge clk_base) begin
    clk1 = 1; #(hi1); clk1 = 0;
  end
  always begin
    @(posedge clk_base);
    begin
      automatic realtime t_rise = tau, t_high = hi2;
      fork
        begin #(t_rise) clk2 = 1; #(t_high) clk2 = 0; end
      join_none
    end
  end

  always @(pulse) begin
    if (measuring && !pulse) high_time += $realtime - t_last;
    if (measuring && pulse) rises++;
    t_last = $realtime;
  end

  initial begin
    realtime d, exp_duty, duty, t0;
    tau = 0.0;
    hi1 = T / 2;
    hi2 = T / 2;
    #(3 * T) rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      hi1 = (pass == 1) ? 0.3 * T : T / 2;
      hi2 = (pass == 2) ? 0.3 * T : T / 2;
      for (int k = 0; k < 25; k++) begin
        tau = k * 1.0 + 0.25;
        #(20 * T);                 // settle
        @(posedge clk1); #0.5;
        high_time = 0; rises = 0; t_last = $realtime; t0 = $realtime;
        measuring = 1;
        #(40 * T);
        if (pulse) high_time += $realtime - t_last;
        measuring = 0;
        duty = high_time / ($realtime - t0);
        d = tau + hi2;
        if (d >= T) d -= T;
        d = d + T - hi2;
        exp_duty = d / (2 * T);
        checks += 2;
        if (duty < exp_duty - 0.01 || duty > exp_duty + 0.01) begin
          failures++;
          $display("tau=%0.2f clk2 high %0.2f: duty %0.4f expected %0.4f", tau, hi2, duty, exp_duty);
        end
        if (rises != 20) begin
          failures++;
          $display("tau=%0.2f %0d pulses in 1 us, expected 20", tau, rises);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
