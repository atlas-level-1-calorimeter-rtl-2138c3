// cam_crate_tb: a full crate scan on cam_top at its default parameters. All
// 16 processor clock inputs are in use: a processor crate fills 14 of them,
// and a jet crate fills all 16.
//
// The testbench first lets the TTC recovery lock. It then finds the phase of
// the local 40 MHz clock from the monitor output, and starts the 16
// processor clocks at random phases chosen clear of the detector's
// wrap-around. Acting as the crate controller through the VME-- registers
// only, it then measures:
//   - every processor clock against the local TTC-derived reference
//     (reference type 1), the way each module's clock is checked against
//     the crate's own timing;
//   - every processor clock against processor 0 (reference type 0), the way
//     neighbouring modules are compared.
// Each reading must agree within 6 counts with the detector's transfer
// function worked out here from the applied phases (duty d/2T, d = tau + T
// for tau < T/2, else tau; code = 512 + (duty - 0.5) * 2048). Every input
// must be reached on both sides.
// Interface: none (self-contained). Timing: about 17 us of simulated time per
// measurement, about 0.6 ms in all.
module cam_crate_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 25000;              // clock period, ps

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

  // Idle TTC line.
  logic a_in = 0, b_in = 1, is_b, bit_val;
  int   cells;
  ttc_source #(.CELL_PS(12500), .T0_PS(5300)) src (.a_in, .b_in, .ttc(ttc_in), .is_b, .bit_val, .cells);

  always #12500 clk = ~clk;            // logic clock, 40 MHz

  // Processor clocks: rise at n*T + phase[i] once started.
  longint phase [16];
  bit     run_clocks = 0;
  for (genvar i = 0; i < 16; i++) begin : g_cpm
    initial begin
      longint n, target;
      wait (run_clocks);
      n = ($time / T) + 2;
      forever begin
        target = n * T + phase[i];
        if (target > $time) #(target - $time);
        cpm_clk[i] = 1;
        #(T / 2);
        cpm_clk[i] = 0;
        n++;
      end
    end
  end

  int checks = 0, failures = 0;
  int reached_ref [16], reached_var [16];

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

  function automatic bit near_wrap(input longint tau_in);
    longint tau;
    tau = wrap_t(tau_in);
    return tau > T / 2 - 800 && tau < T / 2 + 800;
  endfunction

  function automatic int expected_code(input longint tau_in);
    longint tau, d;
    real duty;
    tau = wrap_t(tau_in);
    d = (tau < T / 2) ? tau + T : tau;
    duty = real'(d) / real'(2 * T);
    return int'(512.0 + (duty - 0.5) * 2048.0);
  endfunction

  task automatic measure(input logic [5:0] ref_src, input logic [5:0] var_src,
                         input longint tau, input string what);
    logic [15:0] d;
    int exp_c, guard;
    wreg('h08, 16'(ref_src));
    wreg('h0C, 16'(var_src));
    #2000000;                          // filter settling
    wreg('h12, 16'h0001);
    guard = 0;
    do begin
      rreg('h10, d);
      guard++;
    end while (!d[1] && guard < 2000);
    check(d[1] && !d[0], $sformatf("%s: ADC status %h", what, d));
    rreg('h14, d);
    exp_c = expected_code(tau);
    check(int'(d[9:0]) >= exp_c - 6 && int'(d[9:0]) <= exp_c + 6,
          $sformatf("%s: ADC %0d, expected %0d (tau %0d ps)", what, d[9:0], exp_c, tau));
  endtask

  // Watchdog.
  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint local_ph, t0;
    #200000 vme_reset_n = 1;
    #3000000;                            // TTC recovery locks
    @(posedge clk40_mon) t0 = $time;
    local_ph = wrap_t(t0);
    @(posedge clk40_mon) check($time - t0 == T, "local clock period");
    // Phases clear of the wrap-around against both references.
    phase[0] = wrap_t(local_ph + 1000 + ($urandom % 8000));
    for (int i = 1; i < 16; i++)
      do phase[i] = $urandom % T;
      while (near_wrap(phase[i] - local_ph) || near_wrap(phase[i] - phase[0]));
    run_clocks = 1;
    #200000;

    for (int i = 0; i < 16; i++) begin
      measure({2'd1, 4'd0}, {2'd0, 4'(i)}, phase[i] - local_ph,
              $sformatf("local TTC clock vs CPM%0d", i));
      reached_var[i]++;
    end
    for (int i = 1; i < 16; i++) begin
      measure({2'd0, 4'd0}, {2'd0, 4'(i)}, phase[i] - phase[0],
              $sformatf("CPM0 vs CPM%0d", i));
    end
    // Processor clocks on the reference side: each against processor 0.
    for (int i = 0; i < 16; i++) begin
      measure({2'd0, 4'(i)}, {2'd0, 4'd0}, phase[0] - phase[i],
              $sformatf("CPM%0d vs CPM0", i));
      reached_ref[i]++;
    end
    foreach (reached_ref[i])
      check(reached_ref[i] > 0 && reached_var[i] > 0, $sformatf("input %0d not reached", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
