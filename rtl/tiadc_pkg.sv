// Shared constants and types of the TIADC calibration design.
//
// M channels (ADC cores) of DATA_W-bit samples; the calibration uses N_CAL
// samples per channel for every statistic.  The ADC's adjustment elements
// are driven by DCW_W-bit digital control words whose mid-scale code is the
// nominal (no correction) setting.  The adjustment steps of the three kinds
// of element (0.2 LSB, 0.14 %, 110 fs) enter the arithmetic as the constant
// ratios below.  M, N_CAL and the step sizes follow the published system;
// the widths, the mid-scale convention and the register map are this
// design's own choices.
package tiadc_pkg;

  localparam int unsigned M      = 4;      // interleaved channels
  localparam int unsigned DATA_W = 8;      // ADC resolution
  localparam int unsigned ACC_W  = 48;     // accumulator width (DSP48E)
  localparam int unsigned N_CAL  = 20000;  // samples per channel per statistic
  localparam int unsigned O_FRAC = 4;      // fraction bits of a measured offset
  localparam int unsigned OFS_W  = DATA_W + O_FRAC + 1;
  localparam int unsigned DCW_W  = 10;     // digital control word width
  localparam int unsigned DCW_MID = 1 << (DCW_W - 1);

  // Offset step 0.2 LSB: one DCW code per 0.2 LSB -> factor 5 (Eq. 33).
  localparam int unsigned OFS_CODES_PER_LSB = 5;
  // Gain step 0.14 %: (1 - g) / 0.0014 = (1 - g) * 5000 / 7 (Eq. 34).
  localparam int unsigned GAIN_NUM = 5000;
  localparam int unsigned GAIN_DEN = 7;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [OFS_W-1:0]  ofs_t;
  typedef logic [DCW_W-1:0]         dcw_t;

  // Which adjustment element a DCW goes to.
  typedef enum logic [1:0] {
    DCW_OFFSET = 2'd0,
    DCW_GAIN   = 2'd1,
    DCW_PHASE  = 2'd2
  } dcw_kind_e;

  // One DCW write to the ADC.
  typedef struct packed {
    dcw_kind_e   kind;
    logic [1:0]  ch;
    dcw_t        value;
  } dcw_req_t;

  // SPI frame: write bit (0), 7-bit register address, 16-bit data.
  localparam int unsigned SPI_FRAME_W = 24;

  function automatic logic [6:0] dcw_addr(dcw_kind_e kind, logic [1:0] ch);
    return {3'b001, kind, ch};
  endfunction

endpackage
