// cam_top_tb: end-to-end test of the CAM logic at its default parameters.
//
// The testbench plays the crate: a TTC line (biphase mark, IDLE with random
// Level-1 Accepts), 16 processor clocks with random phases, an SFP loopback
// from the fibre transmitter to fibre receiver 1 with a fixed delay, two
// more fibre clocks, the analog filter and ADC (phase_adc_model) and a
// VME-- master. Software actions go through the register map only.
// Measured and compared with the phase detector's transfer function worked
// out from the clock phases set here (50 % duty at zero phase, rising with
// slope 1/(2T), wrap at T/2; code = 512 + (duty - 0.5) * 2048):
//   - processor clock against processor clock,
//   - local TTC clock, inverted and through the programmable delay, against
//     the looped-back fibre clock (a delay scan, as used to find the in-phase
//     setting), and processor clocks against fibre receivers 2 and 3.
// Also checked: TTC L1As reach the L1A indicator, a burst of 12 (1,0) A/B
// pairs makes the alignment slip and recover, the fibre transmitter follows
// its enable, status and PS_ALERT handling, foreign VME addresses get no
// DTACK*, the clock selection counter test mode steps once per 40080 clocks
// (1 ms) with the test points showing the selected clock, and the ADC test
// mode converts continuously. Each mechanism is counted and one that never
// happened counts as a failure.
module cam_top_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int CELL    = 12500;        // TTC bit cell, ps
  localparam int T       = 2 * CELL;     // 40 MHz period, ps
  localparam int LOOP_PS = 7300;         // fibre loopback delay
  localparam int N_MECH  = 12;

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

  // ---------------- stimulus ----------------
  logic a_in = 0, b_in = 1, is_b, bit_val;
  int   cells;
  ttc_source #(.CELL_PS(CELL), .T0_PS(3000)) src (.a_in, .b_in, .ttc(ttc_in), .is_b, .bit_val, .cells);

  always #12500 clk = ~clk;            // logic clock, 40 MHz

  int phase [16];                      // processor clock phases, ps
  int fib_phase [3];
  initial foreach (phase[i]) phase[i] = 1000 + ($urandom % 23000);
  initial begin
    fib_phase[1] = 4100;
    fib_phase[2] = 17900;
  end

  for (genvar i = 0; i < 16; i++) begin : g_cpm
    initial begin
      #1;
      #(phase[i]);
      forever begin cpm_clk[i] = 1; #(T / 2); cpm_clk[i] = 0; #(T / 2); end
    end
  end
  for (genvar i = 1; i < 3; i++) begin : g_fib
    initial begin
      #1;
      #(fib_phase[i]);
      forever begin fibre_rx_clk[i] = 1; #(T / 2); fibre_rx_clk[i] = 0; #(T / 2); end
    end
  end

  // SFP loopback: light only while the transmitter is enabled.
  always begin
    @(fibre_tx_clk or fibre_tx_en);
    begin
      automatic logic v = fibre_tx_clk & fibre_tx_en;
      fork begin #(LOOP_PS) fibre_rx_clk[0] = v; end join_none
    end
  end

  // TTC content: IDLE, random L1As, and on request a burst of 12 (1,0) pairs.
  int  l1a_sent = 0, burst_left = 0, pend_b = 0;
  bit  count_l1a = 0;
  always @(cells) begin
    // The source has already taken this cell's bit: a value set now is used
    // in the next cell of the same channel, so a B value set in the B cell
    // after an A cell pairs with the A value set in that A cell.
    if (!is_b) begin                   // an A cell has started
      if (burst_left > 0) begin
        a_in = 1;
        burst_left--;
        pend_b++;
      end else begin
        a_in = (($urandom % 16) == 0);
        if (a_in && count_l1a) l1a_sent++;
      end
    end else begin                     // a B cell has started
      if (pend_b > 0) begin
        b_in = 0;
        pend_b--;
      end else b_in = 1;
    end
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int mech [N_MECH];
  string mech_name [N_MECH] = '{"cpm-cpm phase", "ttc-fibre phase", "inverted ttc",
    "delayed ttc scan", "fibre 2/3", "l1a", "a/b slip", "fibre tx enable",
    "ps_alert latch", "foreign address", "mux counter step", "adc continuous"};
  int l1a_seen = 0, slips = 0;
  always @(posedge clk80_mon) begin
    if (led_l1a && count_l1a) l1a_seen++;
    if (led_err) slips++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t ps: %s", $time, msg);
    end
  endtask

  // ---------------- VME-- master ----------------
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

  // Expected ADC code for clock 2 lagging clock 1 by tau ps.
  function automatic int expected_code(input longint tau_in);
    longint tau, d;
    real duty;
    tau = ((tau_in % T) + T) % T;
    d = (tau < T / 2) ? tau + T : tau;
    duty = real'(d) / real'(2 * T);
    return int'(512.0 + (duty - 0.5) * 2048.0);
  endfunction

  function automatic bit near_wrap(input longint tau_in);
    longint tau;
    tau = ((tau_in % T) + T) % T;
    return (tau > T / 2 - 800 && tau < T / 2 + 800) || tau < 800 || tau > T - 800;
  endfunction

  // Select two sources, convert, and compare with the expected code.
  task automatic measure(input logic [5:0] ref_src, input logic [5:0] var_src,
                         input longint tau, input string what, input int m);
    logic [15:0] d;
    int exp_c, guard;
    wreg('h08, 16'(ref_src));
    wreg('h0C, 16'(var_src));
    #2000000;                          // let the phase detector settle (2 us)
    wreg('h12, 16'h0001);
    rreg('h12, d);
    guard = 0;
    do begin
      rreg('h10, d);
      guard++;
    end while (!d[1] && guard < 2000);
    check(d[1] && !d[0], $sformatf("%s: ADC status %h", what, d));
    rreg('h14, d);
    exp_c = expected_code(tau);
    check(d[9:0] >= exp_c - 6 && d[9:0] <= exp_c + 6 && d[15:10] == 0,
          $sformatf("%s: ADC %0d, expected %0d (tau %0d ps)", what, d[9:0], exp_c, tau));
    mech[m]++;
  endtask

  // Watchdog.
  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Local 40 MHz clock phase relative to its rising edge is 0; the looped
  // fibre clock lags it by LOOP_PS.
  initial begin
    logic [15:0] d;
    logic [15:0] rd; bit ack;
    int n;
    longint t0, period;
    foreach (mech[i]) mech[i] = 0;
    #200000 vme_reset_n = 1;
    // Let the TTC recovery lock.
    #3000000;
    count_l1a = 1;

    // Identification.
    rreg('h00, d); check(d == 16'h3380, "module type");

    // Monitor clocks: 12.5 ns and 25 ns periods.
    @(posedge clk80_mon) t0 = $time; @(posedge clk80_mon) period = $time - t0;
    check(period == CELL, $sformatf("80 MHz monitor period %0d ps", period));
    @(posedge clk40_mon) t0 = $time; @(posedge clk40_mon) period = $time - t0;
    check(period == T, $sformatf("40 MHz monitor period %0d ps", period));

    // Processor clock pairs.
    for (int k = 0; k < 6; k++) begin
      int i, j;
      longint tau;
      do begin
        i = $urandom % 16; j = $urandom % 16;
        tau = longint'(phase[j]) - longint'(phase[i]);
      end while (near_wrap(tau));
      measure(6'(i), 6'(j), tau, $sformatf("CPM%0d vs CPM%0d", i, j), 0);
    end

    // Fibre transmitter off: no loopback light.
    wreg('h06, 16'h0000);
    #200000;
    check(fibre_rx_clk[0] == 0 && !fibre_tx_en, "fibre transmitter not off");
    wreg('h06, 16'h0001);
    rreg('h06, d);
    check(d == 16'h0001 && fibre_tx_en, "fibre transmitter not enabled");
    @(posedge fibre_rx_clk[0]) t0 = $time; @(posedge fibre_rx_clk[0]) period = $time - t0;
    check(period == T, "looped-back fibre clock missing");
    mech[7]++;

    // Local TTC clock against its looped-back copy.
    measure({2'd1, 4'd0}, {2'd1, 4'd0}, LOOP_PS, "TTC vs fibre 1", 1);
    measure({2'd2, 4'd0}, {2'd1, 4'd0}, LOOP_PS - CELL, "inverted TTC vs fibre 1", 2);
    for (int c = 0; c <= 500; c += 125) begin
      longint tau;
      tau = LOOP_PS - (2200 + 10 * c);
      if (near_wrap(tau)) continue;
      wreg('h0A, 16'(c));
      measure({2'd3, 4'd0}, {2'd1, 4'd0}, tau, $sformatf("TTC + delay %0d vs fibre 1", c), 3);
    end

    // Fibre receivers 2 and 3 against processor clocks.
    for (int f = 1; f < 3; f++) begin
      int i;
      longint tau;
      do begin
        i = $urandom % 16;
        tau = longint'(fib_phase[f]) - longint'(phase[i]);
      end while (near_wrap(tau));
      measure(6'(i), {2'(f + 1), 4'd0}, tau, $sformatf("CPM%0d vs fibre %0d", i, f + 1), 4);
    end

    // Status register and PS_ALERT.
    sfp_rx_los = 3'b101; sfp_mod_abs = 3'b010; sfp1_tx_fault = 1;
    ps_alert = 1; #100000 ps_alert = 0;
    rreg('h04, d);
    check(d == 16'h808E, $sformatf("status %h", d));
    wreg('h0E, 16'h8000);
    rreg('h04, d);
    check(d == 16'h008E, $sformatf("status after pulse %h", d));
    mech[8]++;
    sfp_rx_los = 0; sfp_mod_abs = 0; sfp1_tx_fault = 0;

    // Foreign address.
    vme_cycle(24'h070004, 0, 0, rd, ack);
    check(!ack, "foreign address acknowledged");
    if (!ack) mech[9]++;

    // L1As and the A/B alignment.
    check(l1a_seen > 10 && l1a_seen >= l1a_sent - 2 && l1a_seen <= l1a_sent + 2,
          $sformatf("L1A: %0d seen, %0d sent", l1a_seen, l1a_sent));
    if (l1a_seen > 0) mech[5]++;
    n = slips;
    count_l1a = 0;
    burst_left = 12;
    #2000000;
    check(slips - n == 2, $sformatf("burst of 12 (1,0) pairs: %0d slips, expected 2", slips - n));
    if (slips - n > 0) mech[6]++;
    l1a_seen = 0; l1a_sent = 0;
    count_l1a = 1;
    #10000000;
    check(l1a_sent > 0 && l1a_seen >= l1a_sent - 2 && l1a_seen <= l1a_sent + 2,
          $sformatf("L1A after realignment: %0d seen, %0d sent", l1a_seen, l1a_sent));

    // ADC continuous test mode.
    adctest = 1;
    n = 0;
    repeat (3) begin
      @(posedge dut.u_adc.dav);
      n++;
    end
    adctest = 0;
    wait (!dut.u_adc.busy);
    check(n == 3, "ADC test mode");
    mech[11] += n;

    // Clock selection counter test mode: one step per 40080 clocks.
    muxtest_mode = 2'd1;
    @(posedge clk);
    #1 check(fibre_tx_en, "fibre transmitter not forced on in counter mode");
    @(dut.u_mux_test.count);
    t0 = $time;
    @(dut.u_mux_test.count);
    period = $time - t0;
    check(period == 40080 * T, $sformatf("counter step %0d ps", period));
    check(dut.u_mux_test.ref_sel == 6'd2 && dut.u_mux_test.var_sel == 6'd2, "counter drives both selections");
    mech[10]++;
    // The test points show processor clock 2 on both sides now.
    n = 0;
    repeat (40) begin
      #(1000 + ($urandom % 3000));
      if (ref_clk_tp == cpm_clk[2] && var_clk_tp == cpm_clk[2]) n++;
    end
    check(n == 40, $sformatf("test points follow processor clock 2 at %0d of 40 samples", n));
    muxtest_mode = 2'd3;
    #1 check(dut.ref_sel == 6'd0 && dut.var_sel == 6'd1 && !fibre_tx_en, "mux test mode 3");
    muxtest_mode = 2'd0;

    foreach (mech[i]) begin
      $display("mechanism %-18s happened %0d times", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
