// cam_pkg: types and constants shared by the Clock Alignment Module (CAM) logic.
//
// The CAM compares the phase of two clocks chosen from 16 processor-module
// clocks, the crate's TTC-derived clock (true, inverted or delayed) and three
// fibre-received clocks. Software chooses the two clocks and reads the phase
// through a 16-bit register interface. This package holds the clock source
// encodings of the two selection registers, the register offsets and the
// module identification value. The encodings and offsets follow the register
// map of the specification; the enum and struct names are this design's own.
package cam_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Number of processor clock inputs and width of the processor number.
  localparam int unsigned N_PROC      = 16;
  localparam int unsigned PROC_W      = 4;
  // Number of fibre-optic clock receivers.
  localparam int unsigned N_FIBRE     = 3;
  // Width of the programmable TTC clock delay value (10 ps steps).
  localparam int unsigned DELAY_W     = 10;
  // ADC resolution.
  localparam int unsigned ADC_W       = 10;

  // Reference source register, bits 5-4.
  typedef enum logic [1:0] {
    REF_CPM     = 2'd0,   // processor clock selected by bits 3-0
    REF_TTC     = 2'd1,   // local TTC-derived 40 MHz clock
    REF_TTC_INV = 2'd2,   // inverted local clock (12.5 ns shift)
    REF_TTC_DLY = 2'd3    // local clock through the programmable delay
  } ref_type_e;

  // Variable source register, bits 5-4.
  typedef enum logic [1:0] {
    VAR_CPM    = 2'd0,    // processor clock selected by bits 3-0
    VAR_FIBRE1 = 2'd1,
    VAR_FIBRE2 = 2'd2,
    VAR_FIBRE3 = 2'd3
  } var_type_e;

  // Six-bit source selection as held in both source registers.
  typedef struct packed {
    logic [1:0]        kind;   // ref_type_e or var_type_e encoding
    logic [PROC_W-1:0] proc;   // processor number
  } src_sel_t;

  // Register word offsets (VME byte offset divided by two); 128 words decoded.
  localparam int unsigned REG_AW = 7;
  typedef enum logic [REG_AW-1:0] {
    R_ID_A      = 7'h00,  // byte offset 0x00
    R_ID_B      = 7'h01,  // 0x02
    R_STATUS    = 7'h02,  // 0x04
    R_CONTROL   = 7'h03,  // 0x06
    R_REF_SRC   = 7'h04,  // 0x08
    R_TTC_DELAY = 7'h05,  // 0x0A
    R_VAR_SRC   = 7'h06,  // 0x0C
    R_PULSE     = 7'h07,  // 0x0E
    R_ADC_STAT  = 7'h08,  // 0x10
    R_ADC_CTRL  = 7'h09,  // 0x12
    R_ADC_DATA  = 7'h0A   // 0x14
  } reg_addr_e;

  // Module type held in ID register A.
  localparam logic [15:0] MODULE_TYPE = 16'h3380;

  // Bench test modes selected by jumpers PL5,PL4.
  typedef enum logic [1:0] {
    MUXTEST_NORMAL  = 2'd0,
    MUXTEST_COUNTER = 2'd1,
    MUXTEST_ZERO    = 2'd2,
    MUXTEST_ZERO_ONE = 2'd3
  } muxtest_e;

endpackage
