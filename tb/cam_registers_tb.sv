// cam_registers_tb: exercises every register of the map through the
// register bus and compares with the field layout of the map:
// ID values, read-back masks of the read/write registers (only the defined
// bits stick, all else reads zero), the outputs they drive, the status bit
// positions of the SFP and PS_ALERT inputs, PS_ALERT latching and clearing
// through the pulse register, the self-clearing ADC start bit, the ADC status
// and data registers, unused offsets reading zero and read-only registers
// ignoring writes.
module cam_registers_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import cam_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              reg_wr = 0;
  logic [REG_AW-1:0] reg_addr = '0;
  logic [15:0]       reg_wdata = '0, reg_rdata;
  logic              ps_alert = 0;
  logic [2:0]        sfp_rx_los = '0, sfp_mod_abs = '0;
  logic              sfp1_tx_fault = 0;
  logic              fibre_tx_en, canuc_prog;
  src_sel_t          ref_sel, var_sel;
  logic [9:0]        ttc_delay;
  logic              adc_start, adc_started = 0, adc_busy = 0, adc_dav = 0;
  logic [9:0]        adc_data = '0;
  int checks = 0, failures = 0;

  cam_registers #(.FW_REV(4'h2), .PCB_REV(4'h1), .SERIAL(8'h07)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: %s", $realtime, msg);
    end
  endtask

  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk);
    reg_addr = REG_AW'(a); reg_wdata = d; reg_wr = 1;
    @(negedge clk) reg_wr = 0;
  endtask

  task automatic rd(input int a, output logic [15:0] d);
    @(negedge clk);
    reg_addr = REG_AW'(a);
    #1 d = reg_rdata;
  endtask

  initial begin
    logic [15:0] d, v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd('h00, d); check(d == 16'h3380, $sformatf("ID A %h", d));
    rd('h01, d); check(d == 16'h2107, $sformatf("ID B %h", d));
    wr('h00, 16'hFFFF); rd('h00, d); check(d == 16'h3380, "ID A written");
    // Read/write registers: random values, masked read-back.
    for (int k = 0; k < 50; k++) begin
      v = 16'($urandom);
      wr('h03, v); rd('h03, d); check(d == (v & 16'h0003), "control mask");
      check(fibre_tx_en == v[0] && canuc_prog == v[1], "control outputs");
      wr('h04, v); rd('h04, d); check(d == (v & 16'h003F), "reference source mask");
      check(ref_sel == v[5:0], "reference source output");
      wr('h05, v); rd('h05, d); check(d == (v & 16'h03FF), "TTC delay mask");
      check(ttc_delay == v[9:0], "TTC delay output");
      wr('h06, v); rd('h06, d); check(d == (v & 16'h003F), "variable source mask");
      check(var_sel == v[5:0], "variable source output");
    end
    // Status bits.
    for (int b = 0; b < 7; b++) begin
      logic [15:0] exp_s;
      {sfp_rx_los, sfp_mod_abs, sfp1_tx_fault} = 7'(1 << b);
      exp_s = '0;
      exp_s[1] = sfp_rx_los[0]; exp_s[0] = sfp_mod_abs[0]; exp_s[2] = sfp1_tx_fault;
      exp_s[4] = sfp_rx_los[1]; exp_s[3] = sfp_mod_abs[1];
      exp_s[7] = sfp_rx_los[2]; exp_s[6] = sfp_mod_abs[2];
      rd('h02, d); check(d == exp_s, $sformatf("status %h expected %h", d, exp_s));
    end
    {sfp_rx_los, sfp_mod_abs, sfp1_tx_fault} = '0;
    // PS_ALERT latch.
    @(negedge clk) ps_alert = 1;
    @(negedge clk) ps_alert = 0;
    repeat (3) @(negedge clk);
    rd('h02, d); check(d == 16'h8000, "PS_ALERT not latched");
    wr('h07, 16'h7FFF); rd('h02, d); check(d == 16'h8000, "cleared by wrong pulse bit");
    wr('h07, 16'h8000); rd('h02, d); check(d == 16'h0000, "PS_ALERT not cleared");
    rd('h07, d); check(d == 0, "pulse register reads non-zero");
    // ADC start bit clears once the conversion has begun.
    wr('h09, 16'hFFFF); rd('h09, d); check(d == 16'h0001, "ADC control mask");
    check(adc_start, "adc_start not driven");
    @(negedge clk) adc_started = 1;
    @(negedge clk) adc_started = 0;
    rd('h09, d); check(d == 0, "start bit not cleared");
    for (int k = 0; k < 4; k++) begin
      {adc_dav, adc_busy} = 2'(k);
      adc_data = 10'($urandom);
      rd('h08, d); check(d == 16'(k), "ADC status");
      rd('h0A, d); check(d == {6'b0, adc_data}, "ADC data");
      wr('h0A, 16'hFFFF); rd('h0A, d); check(d == {6'b0, adc_data}, "ADC data written");
    end
    for (int a = 'h0B; a < 128; a++) begin
      rd(a, d); check(d == 0, $sformatf("unused offset %h reads %h", a, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
