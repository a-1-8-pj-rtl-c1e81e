// adcdr_pkg: widths and types shared by the all-digital CDR blocks.
//
// The DCO fine-tuning input is 45 unit varactor controls: two 7-bit
// thermometer words from the proportional path (one driven by Early, one by
// Late) and a 31-bit thermometer word from the integral path. These widths,
// the 16-bit integrator, the 5 integrator MSBs that reach the DCO, the 6-bit
// coarse resistor word and the 4-bit tail-current word are the widths of the
// published design. The struct layout itself is a choice of this RTL.
package adcdr_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned KP_W        = 3;   // Kp setting 0..7
  localparam int unsigned PROP_W      = 7;   // proportional thermometer bits per sign
  localparam int unsigned ACC_W       = 16;  // integral accumulator width
  localparam int unsigned INT_MSB_W   = 5;   // accumulator MSBs sent to the DCO
  localparam int unsigned INT_THERM_W = 31;  // 2**5 - 1 thermometer bits
  localparam int unsigned KI_W        = 4;   // Ki = 2**ki_shift accumulator LSBs
  localparam int unsigned COARSE_W    = 6;   // coarse resistor tuning
  localparam int unsigned CURRENT_W   = 4;   // tail current tuning
  localparam int unsigned NUM_PHASES  = 8;   // DCO clock phases

  // Fine-tuning word of the DCO, 7 + 7 + 31 = 45 bits.
  typedef struct packed {
    logic [PROP_W-1:0]      prop_early; // ones lower the frequency
    logic [PROP_W-1:0]      prop_late;  // ones raise the frequency
    logic [INT_THERM_W-1:0] integ;      // ones raise the frequency
  } fine_word_t;

  // Thermometer code: the lowest 'value' bits set.
  function automatic logic [INT_THERM_W-1:0] therm31(input logic [INT_MSB_W-1:0] value);
    logic [INT_THERM_W-1:0] t;
    for (int i = 0; i < INT_THERM_W; i++) t[i] = (i < int'(value));
    return t;
  endfunction

  function automatic logic [PROP_W-1:0] therm7(input logic [KP_W-1:0] value);
    logic [PROP_W-1:0] t;
    for (int i = 0; i < PROP_W; i++) t[i] = (i < int'(value));
    return t;
  endfunction
endpackage
