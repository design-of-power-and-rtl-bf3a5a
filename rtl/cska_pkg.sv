// Shared types and default sizes of the area-efficient carry skip adder and
// of the 5-tap FIR filter built from it.
//
// The 32-bit width and the 5 taps follow the design description. The stage
// split (3,4,5 | 8 | 5,4,3 bits, prefix adder in the middle) and the FIR data
// and coefficient widths are this implementation's own choices: the
// description fixes neither.
package cska_pkg;

  // Polarity style of a carry-skip cell. An AOI cell takes true-polarity
  // inputs and returns the inverted carry; an OAI cell takes inverted inputs
  // and returns the true carry. Alternating them keeps every skip cell a
  // single inverting gate.
  typedef enum logic {
    SKIP_AOI = 1'b0,
    SKIP_OAI = 1'b1
  } skip_kind_e;

  localparam int unsigned CSKA_WIDTH  = 32;
  localparam int unsigned CSKA_STAGES = 7;
  localparam int unsigned CSKA_MID    = 3;   // 0-based index of the prefix stage
  // Slice widths, least significant slice first; entries past the last
  // slice are 0. Fixed length so that any slice count up to the maximum can
  // be given as one parameter.
  localparam int unsigned CSKA_MAX_STAGES = 16;
  typedef int unsigned stage_w_t [CSKA_MAX_STAGES];
  localparam stage_w_t CSKA_STAGE_W = '{0: 3, 1: 4, 2: 5, 3: 8, 4: 5, 5: 4, 6: 3, default: 0};

  localparam int unsigned FIR_TAPS   = 5;
  localparam int unsigned FIR_DATA_W = 8;
  localparam int unsigned FIR_COEF_W = 8;

endpackage
