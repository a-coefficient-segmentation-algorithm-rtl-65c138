// seg_fir_pkg: constants and types shared by the coefficient-segmented FIR filter.
//
// Every coefficient h of the filter is split into two parts, h = s + m. The part s is a
// signed power of two, s = (neg ? -1 : +1) * 2**exp, and is applied to the data sample by a
// shift. The part m is a small non-negative number and is applied to the coefficient input of
// the hardware multiplier. This package holds the default sizes (8-bit data and
// coefficients, as in the 8x8-bit case of the method; 89 taps, the longest of the ten
// evaluation filters) and the state type of the segmentation unit.
package seg_fir_pkg;

  // Default word length of data samples and coefficients (8x8-bit multiplier case).
  localparam int unsigned DEF_WIDTH    = 8;
  // Default capacity of the coefficient store and sample delay line: the longest of the
  // ten evaluation filters has 89 taps.
  localparam int unsigned DEF_MAX_TAPS = 89;

  // States of the iterative segmentation unit (flow chart stages).
  typedef enum logic [1:0] {
    SEG_IDLE   = 2'd0,  // waiting for a coefficient
    SEG_SEARCH = 2'd1,  // stage 1: raise i until 2**i >= |h|
    SEG_DONE   = 2'd2   // stages 2 and 3 evaluated, result offered on the output
  } seg_state_t;

  // Which branch of the flow chart produced a segmented coefficient.
  typedef enum logic [1:0] {
    BR_POW2 = 2'd0,     // stage 2: |h| is a power of two, s = h, m = 0
    BR_POS  = 2'd1,     // stage 3, h > 0: s = 2**(i-1), m = h - s
    BR_NEG  = 2'd2      // stage 3, h <= 0: s = -2**i, m = h - s
  } seg_branch_t;

  // Controller states of the filter sequencer.
  typedef enum logic {
    FIR_IDLE  = 1'b0,   // accepts a coefficient load or a new sample
    FIR_ISSUE = 1'b1    // issues one tap per clock to the MAC datapath
  } fir_state_t;

endpackage
