// adc_controller: runs the phase ADC and holds its result.
//
// A conversion is requested by `start` (the StartConversion bit of the ADC
// Control register) or, in the ADC bench test mode, continuously. The state
// machine follows the four states of the specification:
//   IDLE   - Busy = 0; DAV keeps its value.
//   START  - chip select goes low, which starts the ADC; Busy = 1, DAV = 0;
//            `started` pulses so that the StartConversion bit is cleared.
//   WAIT   - the ADC converts (about 13-20 us); when its DOUT line goes high
//            (end of conversion) the controller clocks the result out.
//   UPDATE - the 10-bit result is written to the data register; Busy = 0,
//            DAV = 1.
// The serial readout inside WAIT is a sub-phase (READ) of this design. The
// ADC's serial protocol is that of the MAX1243 family as this design reads
// it: chip select low starts a conversion, DOUT high signals its end, then
// each falling SCLK edge presents the next bit, MSB first, ten data bits
// followed by two zero sub-bits. The controller samples DOUT at the end of
// each SCLK low phase, so after falling edges 1..10 it reads D9..D0.
//
// Ports: clk (logic clock), rst_n, start, test_continuous, started, busy,
// dav, data; adc_cs_n, adc_sclk, adc_dout to the ADC.
// Timing: SCLK period is 2*SCLK_HALF clk cycles; a conversion takes the
// ADC's conversion time plus 12 SCLK periods plus about four cycles.
// SCLK_HALF must be at least 2. The bit rate, the READ sub-phase and the
// serial protocol details are choices of this design; the states and the
// Busy/DAV flags follow the specification.
module adc_controller #(
  parameter int unsigned ADC_W      = 10,
  parameter int unsigned SCLK_HALF  = 10,  // clk cycles per SCLK half period
  parameter int unsigned SUB_BITS   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             test_continuous,
  output logic             started,
  output logic             busy,
  output logic             dav,
  output logic [ADC_W-1:0] data,
  output logic             adc_cs_n,
  output logic             adc_sclk,
  input  logic             adc_dout
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {IDLE, START, WAIT, READ, UPDATE} state_e;

  localparam int unsigned NBITS = ADC_W + SUB_BITS;
  localparam int unsigned DIV_W = $clog2(SCLK_HALF + 1);
  localparam int unsigned BIT_W = $clog2(NBITS + 1);

  state_e           state;
  logic [DIV_W-1:0] div;
  logic [BIT_W-1:0] nbit;
  logic [ADC_W-1:0] shreg;
  logic             dout_s;   // synchronised DOUT

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout_s <= 1'b0;
    else        dout_s <= adc_dout;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      started  <= 1'b0;
      busy     <= 1'b0;
      dav      <= 1'b0;
      data     <= '0;
      adc_cs_n <= 1'b1;
      adc_sclk <= 1'b0;
      div      <= '0;
      nbit     <= '0;
      shreg    <= '0;
    end else begin
      started <= 1'b0;
      unique case (state)
        IDLE: begin
          adc_cs_n <= 1'b1;
          adc_sclk <= 1'b0;
          if (start || test_continuous) state <= START;
        end
        START: begin
          adc_cs_n <= 1'b0;
          busy     <= 1'b1;
          dav      <= 1'b0;
          started  <= 1'b1;
          div      <= '0;
          state    <= WAIT;
        end
        WAIT: begin
          // Allow the ADC one SCLK half period to pull DOUT low after CS.
          if (div != DIV_W'(SCLK_HALF)) div <= div + 1'b1;
          else if (dout_s) begin
            div   <= '0;
            nbit  <= '0;
            state <= READ;
          end
        end
        READ: begin
          if (div != DIV_W'(SCLK_HALF - 1)) div <= div + 1'b1;
          else begin
            div <= '0;
            if (!adc_sclk) begin
              // End of a low phase: sample the bit presented by the last fall.
              if (nbit != '0 && nbit <= BIT_W'(ADC_W)) shreg <= {shreg[ADC_W-2:0], dout_s};
              if (nbit == BIT_W'(NBITS)) state <= UPDATE;
              else                       adc_sclk <= 1'b1;
            end else begin
              adc_sclk <= 1'b0;
              nbit     <= nbit + 1'b1;
            end
          end
        end
        UPDATE: begin
          adc_cs_n <= 1'b1;
          data     <= shreg;
          busy     <= 1'b0;
          dav      <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
