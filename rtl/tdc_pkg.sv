// tdc_pkg: constants and types shared by the time-to-digital converter.
//
// The TDC measures the arrival time of a "hit" edge against a 300 MHz clock.
// A free running coarse counter gives whole clock periods; a tapped delay line
// built from FPGA carry chains gives the position of the edge inside the
// period. The numbers below are the defaults used throughout the RTL:
//   * 16-cycle frames, one cycle of which resets the line in normal mode
//     (from the design description),
//   * 208 taps per 3.33 ns clock period at nominal conditions (the measured
//     range is 207 to 208 elements, 16.1 ps per tap),
//   * 416 taps in the line, i.e. two clock periods (104 four-tap slices);
//     the line length itself is this design's choice,
//   * calibrated output codes in ]0, 2^8] (b = 8 is this design's choice).
package tdc_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NTAPS       = 416; // taps in the carry-chain line
  localparam int unsigned FRAME_W     = 4;   // frame = 2**FRAME_W = 16 cycles
  localparam int unsigned COARSE_W    = 16;  // free running coarse counter
  localparam int unsigned CODE_W      = 9;   // raw fine code 0..NTAPS
  localparam int unsigned CAL_B       = 8;   // calibrated code interval ]0, 2^b]
  localparam int unsigned CAL_W       = CAL_B + 1;
  localparam int unsigned RANGE_INIT  = 208; // taps per clock period before ARA
  localparam int unsigned SYNC_STAGES = 3;   // three-stage synchronizer
  localparam int unsigned DITHER_F    = 8;   // fraction bits of dither boundaries

  // Bubble suppression of the thermometer-to-binary encoder.
  typedef enum logic {
    BUBBLE_FIRST_BIT = 1'b0,  // position of the furthest propagated bit
    BUBBLE_COUNT     = 1'b1   // number of propagated bits
  } bubble_method_e;

  // One word of the readout FIFO.
  typedef struct packed {
    logic [COARSE_W-1:0] coarse; // coarse count of the sampling clock edge
    logic [CODE_W-1:0]   raw;    // taps the edge travelled before that edge
    logic [CAL_W-1:0]    cal;    // raw code mapped to ]0, 2^b]
  } tdc_word_t;

  localparam int unsigned WORD_W = $bits(tdc_word_t);
endpackage
