// cam_top: logic of the Clock Alignment Module (CAM).
//
// The CAM lets software align the clocks of the processor modules in a
// crate. Each module sends a copy of its transmit clock to one of 16 inputs.
// Software selects a reference clock and a "variable" clock, the phase
// detector turns their phase difference into a pulse train whose duty cycle
// is averaged by an analog filter and digitised by a 10-bit serial ADC, and
// software reads the result while sweeping the delay of the source module's
// clock. The CAM also recovers its own 40 MHz clock from the crate's TTC
// signal, so that a local reference (true, inverted or through a 2.2-12.2 ns
// programmable delay) can be compared, and sends it out on fibre; three
// fibre receivers bring in the clocks of other crates.
//
// Blocks and their wiring:
//   TTC path:  ttc_clock_recovery -> iz_nrz_decoder -> ab_align -> clock40
//              clock40 -> ttc_delay (code from the TTC Delay register)
//   Phase:     clock_select (reference, variable) -> phase_detector
//              -> phase_pulse (to the analog filter and the ADC)
//   Control:   vme_slave <-> cam_registers -> mux_test -> clock_select
//              cam_registers <-> adc_controller <-> ADC serial pins
// The analog parts (input receivers, filter, ADC chip, SFP modules, output
// drivers, CAN daughter card) are outside this module: their logic-level
// signals are its ports. ttc_clock_recovery and ttc_delay are behavioural
// models of PECL circuits, so this module is simulation-only as a whole;
// every other block is synthesizable.
//
// Clocks: clk is the logic clock of the VME and ADC control logic (taken as
// 40.08 MHz, independent of the TTC path); the TTC path runs on the
// recovered 80 MHz clock; the phase detector runs on the two selected clocks.
// vme_reset_n resets everything asynchronously.
// ref_clk_tp and var_clk_tp bring the two selected clocks out to test
// points, where the clock selection test mode is observed.
// The IZ sample, A/B slot, lock flag, decoded A/B bits, register read
// strobe and test counter are wired but not used further on the board;
// they are kept as named nets for observation, which lint reports as unused.
// The block partition and register map follow the specification; the
// separate logic clock and the raw (unstretched) indicator outputs are this
// design's choices.
// Parameters: BASE_ADDR (VME base), RUN_LIMIT and A_ONES_RULE (A/B slip
// rule, see ab_align), SCLK_HALF (ADC serial clock), STEP_CYCLES (test
// counter step, 1 ms), DS_FILTER (DS0* filter length).
module cam_top
  import cam_pkg::*;
#(
  parameter logic [23:0] BASE_ADDR   = 24'h060000,
  parameter int unsigned RUN_LIMIT   = 11,
  parameter bit          A_ONES_RULE = 1'b0,
  parameter int unsigned SCLK_HALF   = 10,
  parameter int unsigned STEP_CYCLES = 40080,
  parameter int unsigned DS_FILTER   = 3
) (
  input  logic               clk,
  input  logic               vme_reset_n,
  // VME-- backplane
  input  logic               vme_ds0_n,
  input  logic               vme_write_n,
  input  logic [23:1]        vme_addr,
  input  logic [15:0]        vme_data_in,
  output logic [15:0]        vme_data_out,
  output logic               vme_data_oe,
  output logic               vme_dtack_n,
  // clocks in
  input  logic [N_PROC-1:0]  cpm_clk,
  input  logic [N_FIBRE-1:0] fibre_rx_clk,
  input  logic               ttc_in,
  // SFP modules
  input  logic [2:0]         sfp_rx_los,
  input  logic [2:0]         sfp_mod_abs,
  input  logic               sfp1_tx_fault,
  output logic               fibre_tx_clk,
  output logic               fibre_tx_en,
  // monitor outputs
  output logic               clk80_mon,
  output logic               clk40_mon,
  output logic               ref_clk_tp,     // selected reference clock
  output logic               var_clk_tp,     // selected variable clock
  // phase measurement
  output logic               phase_pulse,
  output logic               adc_cs_n,
  output logic               adc_sclk,
  input  logic               adc_dout,
  // bench test jumpers
  input  logic [1:0]         muxtest_mode,   // PL5, PL4
  input  logic               adctest,        // PL3
  // daughter card and indicators
  input  logic               ps_alert,
  output logic               canuc_prog,
  output logic               led_vme,
  output logic               led_l1a,
  output logic               led_err
);
  timeunit 1ns;
  timeprecision 1ps;

  // ---------------- TTC clock and data recovery ----------------
  logic clock80, clock80_sample, iz, nrz;
  logic slot_b, clock40, ttc_locked, ttc_violation, l1a;
  logic a_bit, b_bit, pair_valid;
  logic clock40_dly;

  ttc_clock_recovery u_recovery (
    .ttc_in, .clock80, .clock80_sample
  );

  iz_nrz_decoder u_decoder (
    .ttc_in, .clk_sample(clock80_sample), .clk80(clock80), .rst_n(vme_reset_n),
    .iz, .nrz
  );

  ab_align #(.RUN_LIMIT(RUN_LIMIT), .A_ONES_RULE(A_ONES_RULE)) u_ab_align (
    .clk80(clock80), .rst_n(vme_reset_n), .nrz, .slot_b, .clock40,
    .locked(ttc_locked), .violation(ttc_violation), .l1a,
    .a_bit, .b_bit, .pair_valid
  );

  // ---------------- VME registers ----------------
  logic              reg_wr, reg_rd;
  logic [REG_AW-1:0] reg_addr;
  logic [15:0]       reg_wdata, reg_rdata;
  logic              vme_access;
  src_sel_t          reg_ref_sel, reg_var_sel, ref_sel, var_sel;
  logic [DELAY_W-1:0] ttc_delay_code;
  logic              reg_fibre_tx_en;
  logic              adc_start, adc_started, adc_busy, adc_dav;
  logic [ADC_W-1:0]  adc_data;
  logic [5:0]        test_count;

  vme_slave #(.BASE_ADDR(BASE_ADDR), .DS_FILTER(DS_FILTER), .AW(REG_AW)) u_vme (
    .clk, .rst_n(vme_reset_n), .vme_ds0_n, .vme_write_n, .vme_addr,
    .vme_data_in, .vme_data_out, .vme_data_oe, .vme_dtack_n,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .access(vme_access)
  );

  cam_registers u_regs (
    .clk, .rst_n(vme_reset_n), .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .ps_alert, .sfp_rx_los, .sfp_mod_abs, .sfp1_tx_fault,
    .fibre_tx_en(reg_fibre_tx_en), .canuc_prog,
    .ref_sel(reg_ref_sel), .var_sel(reg_var_sel), .ttc_delay(ttc_delay_code),
    .adc_start, .adc_started, .adc_busy, .adc_dav, .adc_data
  );

  mux_test #(.STEP_CYCLES(STEP_CYCLES)) u_mux_test (
    .clk, .rst_n(vme_reset_n), .mode(muxtest_e'(muxtest_mode)),
    .reg_ref_sel, .reg_var_sel, .reg_fibre_tx_en,
    .ref_sel, .var_sel, .fibre_tx_en, .count(test_count)
  );

  // ---------------- clock selection and phase detection ----------------
  logic ref_clk, var_clk;

  ttc_delay #(.W(DELAY_W)) u_delay (
    .clk_in(clock40), .code(ttc_delay_code), .clk_out(clock40_dly)
  );

  clock_select u_select (
    .cpm_clk, .ttc_clk(clock40), .ttc_clk_dly(clock40_dly),
    .fibre_clk(fibre_rx_clk), .ref_sel, .var_sel, .ref_clk, .var_clk
  );

  phase_detector u_phase (
    .clk1(ref_clk), .clk2(var_clk), .rst_n(vme_reset_n), .pulse(phase_pulse)
  );

  adc_controller #(.ADC_W(ADC_W), .SCLK_HALF(SCLK_HALF)) u_adc (
    .clk, .rst_n(vme_reset_n), .start(adc_start), .test_continuous(adctest),
    .started(adc_started), .busy(adc_busy), .dav(adc_dav), .data(adc_data),
    .adc_cs_n, .adc_sclk, .adc_dout
  );

  // ---------------- outputs ----------------
  assign fibre_tx_clk = clock40;
  assign clk80_mon    = clock80;
  assign clk40_mon    = clock40;
  assign ref_clk_tp   = ref_clk;
  assign var_clk_tp   = var_clk;
  assign led_vme      = vme_access;
  assign led_l1a      = l1a;
  assign led_err      = ttc_violation;

endmodule
