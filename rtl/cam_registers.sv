// cam_registers: the CAM's VME register map.
//
// Word offset (byte offset) and contents, as in the specification:
//   0x00 (0x00) RO  Module ID A: module type 0x3380
//   0x01 (0x02) RO  Module ID B: [15:12] firmware rev, [11:8] PCB rev,
//                   [7:0] serial number
//   0x02 (0x04) RO  Status: [15] PS_ALERT latched, [7:6] SFP3 RX loss of
//                   signal / module removed, [4:3] same for SFP2, [2] SFP1 TX
//                   laser fault, [1:0] SFP1 RX loss of signal / removed
//   0x03 (0x06) R/W Control: [1] CANuC programming mode, [0] fibre Tx enable
//   0x04 (0x08) R/W Reference source: [5:4] type, [3:0] processor
//   0x05 (0x0A) R/W TTC delay: [9:0] delay code in 10 ps steps
//   0x06 (0x0C) R/W Variable source: [5:4] type, [3:0] processor
//   0x07 (0x0E) WO  Module pulse: writing 1 to [15] clears Status[15]
//   0x08 (0x10) RO  ADC status: [1] data available, [0] busy
//   0x09 (0x12) R/W ADC control: [0] start conversion, cleared by the ADC
//                   controller once the conversion has begun
//   0x0A (0x14) RO  ADC data: [9:0] phase value (about 0x200 in phase)
// Unused bits and unused offsets read as zero; writes to read-only
// registers are ignored. Status[15] is set while ps_alert is high and stays
// set until cleared through the pulse register.
//
// Ports: clk, rst_n; reg_wr / reg_addr / reg_wdata (one-cycle write),
// reg_rdata (combinational read of reg_addr); status inputs; register
// outputs to the rest of the module; ADC controller handshake.
// The field layout follows the specification. Reset values (all zero), the
// PS_ALERT latching and the revision parameters are this design's choices.
module cam_registers
  import cam_pkg::*;
#(
  parameter logic [3:0] FW_REV   = 4'h1,
  parameter logic [3:0] PCB_REV  = 4'h1,
  parameter logic [7:0] SERIAL   = 8'h00
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_wr,
  input  logic [REG_AW-1:0] reg_addr,
  input  logic [15:0]       reg_wdata,
  output logic [15:0]       reg_rdata,
  // status inputs
  input  logic              ps_alert,
  input  logic [2:0]        sfp_rx_los,     // SFP modules 1..3
  input  logic [2:0]        sfp_mod_abs,    // SFP modules 1..3
  input  logic              sfp1_tx_fault,
  // control outputs
  output logic              fibre_tx_en,
  output logic              canuc_prog,
  output src_sel_t          ref_sel,
  output src_sel_t          var_sel,
  output logic [DELAY_W-1:0] ttc_delay,
  // ADC controller
  output logic              adc_start,
  input  logic              adc_started,
  input  logic              adc_busy,
  input  logic              adc_dav,
  input  logic [ADC_W-1:0]  adc_data
);
  timeunit 1ns;
  timeprecision 1ps;

  logic ps_alert_latch;
  logic [15:0] status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fibre_tx_en    <= 1'b0;
      canuc_prog     <= 1'b0;
      ref_sel        <= '0;
      var_sel        <= '0;
      ttc_delay      <= '0;
      adc_start      <= 1'b0;
      ps_alert_latch <= 1'b0;
    end else begin
      if (adc_started) adc_start <= 1'b0;
      if (ps_alert)    ps_alert_latch <= 1'b1;
      if (reg_wr) begin
        unique case (reg_addr)
          R_CONTROL:   {canuc_prog, fibre_tx_en} <= reg_wdata[1:0];
          R_REF_SRC:   ref_sel   <= reg_wdata[5:0];
          R_TTC_DELAY: ttc_delay <= reg_wdata[DELAY_W-1:0];
          R_VAR_SRC:   var_sel   <= reg_wdata[5:0];
          R_PULSE:     if (reg_wdata[15] && !ps_alert) ps_alert_latch <= 1'b0;
          R_ADC_CTRL:  adc_start <= reg_wdata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    status = '0;
    status[15]  = ps_alert_latch;
    status[7:6] = {sfp_rx_los[2], sfp_mod_abs[2]};
    status[4:3] = {sfp_rx_los[1], sfp_mod_abs[1]};
    status[2]   = sfp1_tx_fault;
    status[1:0] = {sfp_rx_los[0], sfp_mod_abs[0]};
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr)
      R_ID_A:      reg_rdata = MODULE_TYPE;
      R_ID_B:      reg_rdata = {FW_REV, PCB_REV, SERIAL};
      R_STATUS:    reg_rdata = status;
      R_CONTROL:   reg_rdata[1:0] = {canuc_prog, fibre_tx_en};
      R_REF_SRC:   reg_rdata[5:0] = ref_sel;
      R_TTC_DELAY: reg_rdata[DELAY_W-1:0] = ttc_delay;
      R_VAR_SRC:   reg_rdata[5:0] = var_sel;
      R_ADC_STAT:  reg_rdata[1:0] = {adc_dav, adc_busy};
      R_ADC_CTRL:  reg_rdata[0] = adc_start;
      R_ADC_DATA:  reg_rdata[ADC_W-1:0] = adc_data;
      default:     reg_rdata = '0;
    endcase
  end

endmodule
