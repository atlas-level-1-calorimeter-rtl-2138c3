// vme_slave: the reduced VME ("VME--") slave of the CAM.
//
// The crate's VME-- bus has 24 address lines (A23..A1), 16 data lines, a
// single data strobe DS0*, WRITE* and DTACK*, and no address strobe or
// address modifiers. A cycle is therefore framed by DS0* alone. DS0* is
// synchronised to the logic clock and must be seen at the same level for
// DS_FILTER consecutive clocks before the slave acts on it, so glitches and
// non-monotonic edges on the backplane cannot start or end a cycle. When a
// filtered strobe arrives and A23..A8 match the base address, the slave
// issues one register read or write strobe for word offset A7..A1 (128
// words), drives the read data, asserts DTACK* and holds both until the
// filtered strobe goes away. Addresses that do not match are ignored.
//
// Ports: clk, rst_n; vme_ds0_n, vme_write_n, vme_addr (A23..A1),
// vme_data_in / vme_data_out / vme_data_oe (the bidirectional data bus
// split for the pad buffers), vme_dtack_n; reg_wr, reg_rd, reg_addr,
// reg_wdata, reg_rdata to the register file; access (a cycle is in progress,
// for the VME indicator).
// Timing: with DS0* changing between clock edges, DTACK* goes low on the
// (DS_FILTER + 5)th rising clock edge after DS0* falls and returns high on
// the (DS_FILTER + 3)th edge after DS0* rises.
// The base address 0x060000 and the 128-word block follow the
// specification; the filter length and cycle timing are this design's.
// rst_n is an asynchronous reset of the flip-flops and also the disable
// condition of the two bus assertions, which sample it on the clock; lint
// tools report it as used both ways, which is intended.
module vme_slave #(
  parameter logic [23:0] BASE_ADDR = 24'h060000,
  parameter int unsigned DS_FILTER = 3,
  parameter int unsigned AW        = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vme_ds0_n,
  input  logic          vme_write_n,
  input  logic [23:1]   vme_addr,
  input  logic [15:0]   vme_data_in,
  output logic [15:0]   vme_data_out,
  output logic          vme_data_oe,
  output logic          vme_dtack_n,
  output logic          reg_wr,
  output logic          reg_rd,
  output logic [AW-1:0] reg_addr,
  output logic [15:0]   reg_wdata,
  input  logic [15:0]   reg_rdata,
  output logic          access
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {S_IDLE, S_STROBE, S_ACK, S_DONE} state_e;

  localparam int unsigned FW = $clog2(DS_FILTER + 1);

  logic [1:0]    ds_sync;     // two-stage synchroniser, active high
  logic [FW-1:0] flt_cnt;
  logic          ds_active;   // filtered strobe
  logic          match;
  state_e        state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ds_sync <= '0;
    else        ds_sync <= {ds_sync[0], ~vme_ds0_n};
  end

  // Level filter: change ds_active only after DS_FILTER equal samples.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flt_cnt   <= '0;
      ds_active <= 1'b0;
    end else if (ds_sync[1] == ds_active) begin
      flt_cnt <= '0;
    end else if (flt_cnt == FW'(DS_FILTER - 1)) begin
      flt_cnt   <= '0;
      ds_active <= ds_sync[1];
    end else begin
      flt_cnt <= flt_cnt + 1'b1;
    end
  end

  assign match = (vme_addr[23:AW+1] == BASE_ADDR[23:AW+1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      reg_wr       <= 1'b0;
      reg_rd       <= 1'b0;
      reg_addr     <= '0;
      reg_wdata    <= '0;
      vme_data_out <= '0;
      vme_data_oe  <= 1'b0;
      vme_dtack_n  <= 1'b1;
    end else begin
      reg_wr <= 1'b0;
      reg_rd <= 1'b0;
      unique case (state)
        S_IDLE: if (ds_active && match) begin
          reg_addr  <= vme_addr[AW:1];
          reg_wdata <= vme_data_in;
          reg_wr    <= ~vme_write_n;
          reg_rd    <= vme_write_n;
          state     <= S_STROBE;
        end else if (ds_active) begin
          state <= S_DONE;          // not for this module: wait for release
        end
        S_STROBE: begin
          vme_data_out <= reg_rdata;
          vme_data_oe  <= ~reg_wr;
          state        <= S_ACK;
        end
        S_ACK: begin
          vme_dtack_n <= 1'b0;
          if (!ds_active) begin
            vme_dtack_n <= 1'b1;
            vme_data_oe <= 1'b0;
            state       <= S_IDLE;
          end
        end
        S_DONE: if (!ds_active) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign access = (state != S_IDLE);

  // A register strobe only follows a filtered, matching data strobe.
  a_strobe_framed: assert property (@(posedge clk) disable iff (!rst_n)
                                    (reg_wr || reg_rd) |-> $past(ds_active && match));
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(reg_wr && reg_rd));

endmodule
