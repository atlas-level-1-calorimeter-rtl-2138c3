// cam_sweep_tb: the CAM's main use case, run end to end on cam_top at its
// default parameters: finding the in-phase delay setting of one processor
// module by sweeping its clock delay over a whole clock period.
//
// Processor clock 0 is the reference. Processor clock 5 belongs to the module
// being set up. Its clock is delayed by STEP_PS per setting, as the fine delay
// of a TTC receiver would step it (240 steps of 104.17 ps cover the 25 ns
// period). For each setting, the testbench acts as the crate controller
// through the VME-- register map only: it selects reference = processor 0
// and variable = processor 5, waits for the filter to settle, starts a
// conversion, polls DAV and reads the ADC data. The analog filter and ADC are
// modelled by phase_adc_model.
// Checks:
//   - every reading agrees within 6 counts with the transfer function worked
//     out here from the applied lag (duty d/2T with d = tau + T for
//     tau < T/2, else tau; code = 512 + (duty - 0.5) * 2048), except within
//     0.8 ns of the wrap-around;
//   - the readings rise monotonically from setting to setting, apart from
//     exactly one wrap-around per period;
//   - the setting whose reading is nearest 0x200 (the in-phase setting
//     software would choose) is within 100 ps of the true zero-phase delay,
//     the accuracy the module is built for.
// Interface: none (self-contained). Timing: about 17 us of simulated time per
// setting, about 5 ms in all.
module cam_sweep_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int    T       = 25000;     // clock period, ps
  localparam int    N_STEP  = 240;       // settings per period
  localparam real   STEP_PS = 25000.0 / 240.0;
  localparam int    REF_PH  = 3000;      // phase of processor clock 0, ps
  localparam int    BASE_PH = 9100;      // phase of clock 5 at setting 0, ps

  logic        clk = 0, vme_reset_n = 0;
  logic        vme_ds0_n = 1, vme_write_n = 1;
  logic [23:1] vme_addr = '0;
  logic [15:0] vme_data_in = '0, vme_data_out;
  logic        vme_data_oe, vme_dtack_n;
  logic [15:0] cpm_clk = '0;
  logic [2:0]  fibre_rx_clk = '0;
  logic        ttc_in;
  logic [2:0]  sfp_rx_los = '0, sfp_mod_abs = '0;
  logic        sfp1_tx_fault = 0;
  logic        fibre_tx_clk, fibre_tx_en;
  logic        clk80_mon, clk40_mon;
  logic        phase_pulse, adc_cs_n, adc_sclk, adc_dout;
  logic [1:0]  muxtest_mode = 2'd0;
  logic        adctest = 0;
  logic        ps_alert = 0;
  logic        canuc_prog, led_vme, led_l1a, led_err;
  logic        ref_clk_tp, var_clk_tp;

  cam_top dut (.*);
  phase_adc_model adc (.pulse(phase_pulse), .cs_n(adc_cs_n), .sclk(adc_sclk), .dout(adc_dout));

  // An idle TTC line keeps the local clock path running.
  logic a_in = 0, b_in = 1, is_b, bit_val;
  int   cells;
  ttc_source #(.CELL_PS(12500), .T0_PS(3000)) src (.a_in, .b_in, .ttc(ttc_in), .is_b, .bit_val, .cells);

  always #12500 clk = ~clk;            // logic clock, 40 MHz

  // Reference clock: fixed phase.
  initial begin
    #(REF_PH);
    forever begin cpm_clk[0] = 1; #(T / 2); cpm_clk[0] = 0; #(T / 2); end
  end

  // Clock under adjustment: each cycle starts at n*T + BASE_PH + delay.
  longint dly5 = 0;
  initial begin
    longint n, target;
    n = 0;
    forever begin
      target = n * T + BASE_PH + dly5;
      if (target > $time) #(target - $time);
      cpm_clk[5] = 1;
      #(T / 2);
      cpm_clk[5] = 0;
      n++;
    end
  end

  // The other processor clocks run at random phases.
  for (genvar i = 1; i < 16; i++) begin : g_cpm
    if (i != 5) begin : g_on
      initial begin
        #(1000 + ($urandom % 23000));
        forever begin cpm_clk[i] = 1; #(T / 2); cpm_clk[i] = 0; #(T / 2); end
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t ps: %s", $time, msg);
    end
  endtask

  // VME-- master: one cycle, DS0* framed.
  task automatic vme_cycle(input logic [23:0] byte_addr, input bit wr, input logic [15:0] wd,
                           output logic [15:0] rd, output bit acked);
    int edges;
    @(negedge clk);
    vme_addr = byte_addr[23:1]; vme_write_n = !wr; vme_data_in = wd;
    @(negedge clk) vme_ds0_n = 0;
    edges = 0; acked = 0; rd = '0;
    while (edges < 40) begin
      @(posedge clk); edges++;
      #1;
      if (!vme_dtack_n) begin acked = 1; break; end
    end
    rd = vme_data_out;
    @(negedge clk) vme_ds0_n = 1;
    if (acked) wait (vme_dtack_n);
    repeat (2) @(posedge clk);
  endtask

  task automatic wreg(input int off, input logic [15:0] d);
    logic [15:0] rd; bit ack;
    vme_cycle(24'h060000 + 24'(off), 1, d, rd, ack);
    check(ack, $sformatf("write to %h not acknowledged", off));
  endtask

  task automatic rreg(input int off, output logic [15:0] d);
    bit ack;
    vme_cycle(24'h060000 + 24'(off), 0, 0, d, ack);
    check(ack, $sformatf("read of %h not acknowledged", off));
  endtask

  function automatic longint wrap_t(input longint tau_in);
    return ((tau_in % T) + T) % T;
  endfunction

  function automatic int expected_code(input longint tau_in);
    longint tau, d;
    real duty;
    tau = wrap_t(tau_in);
    d = (tau < T / 2) ? tau + T : tau;
    duty = real'(d) / real'(2 * T);
    return int'(512.0 + (duty - 0.5) * 2048.0);
  endfunction

  // Watchdog.
  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  code [N_STEP];
  initial begin
    logic [15:0] d;
    int guard, wraps, best_k, best_err, exp_c;
    longint tau, tau_best;
    #200000 vme_reset_n = 1;
    #1000000;
    wreg('h08, 16'h0000);                // reference: processor 0
    wreg('h0C, 16'h0005);                // variable: processor 5
    for (int k = 0; k < N_STEP; k++) begin
      dly5 = longint'(real'(k) * STEP_PS);
      #2000000;                          // filter settling
      wreg('h12, 16'h0001);
      guard = 0;
      do begin
        rreg('h10, d);
        guard++;
      end while (!d[1] && guard < 2000);
      check(d[1] && !d[0], $sformatf("setting %0d: ADC status %h", k, d));
      rreg('h14, d);
      code[k] = int'(d[9:0]);
      tau = BASE_PH + dly5 - REF_PH;
      exp_c = expected_code(tau);
      if (!(wrap_t(tau) > T / 2 - 800 && wrap_t(tau) < T / 2 + 800))
        check(code[k] >= exp_c - 6 && code[k] <= exp_c + 6,
              $sformatf("setting %0d: ADC %0d, expected %0d", k, code[k], exp_c));
    end

    // Monotonic rise with one wrap-around (a fall of more than half scale).
    wraps = 0;
    for (int k = 1; k < N_STEP; k++) begin
      if (code[k] < code[k-1] - 512) wraps++;
      else check(code[k] >= code[k-1], $sformatf("setting %0d: reading fell from %0d to %0d",
                                                 k, code[k-1], code[k]));
    end
    check(wraps == 1, $sformatf("%0d wrap-arounds in one period", wraps));

    // In-phase setting chosen from the readings alone.
    best_k = 0; best_err = 1024;
    for (int k = 0; k < N_STEP; k++)
      if ((code[k] > 512 ? code[k] - 512 : 512 - code[k]) < best_err) begin
        best_err = code[k] > 512 ? code[k] - 512 : 512 - code[k];
        best_k = k;
      end
    tau_best = BASE_PH + longint'(real'(best_k) * STEP_PS) - REF_PH;
    tau_best = wrap_t(tau_best);
    if (tau_best > T / 2) tau_best -= T;
    $display("in-phase setting %0d, reading %0d, residual phase %0d ps", best_k, code[best_k], tau_best);
    check(tau_best >= -100 && tau_best <= 100,
          $sformatf("in-phase setting %0d is %0d ps from zero phase", best_k, tau_best));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
