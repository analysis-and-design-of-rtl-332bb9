// cpsd_pkg: sizes, defaults and shared types of the CPSD ECG processor.
//
// The processor turns a 10-bit, 256 sample/s ECG stream into one CPSD
// (Chaotic Phase Space Differential) value per second. Sizes that the
// algorithm fixes (10-bit samples, 256 sps, an 8-second filtered-data
// buffer) follow the published design; the matrix size (16 x 16 cells of
// 10-bit counts, which together with the buffer gives the 25,600 SRAM bits
// reported for the processor), the filter word lengths and every run-time
// default (W, d, h) are this implementation's choices.
package cpsd_pkg;

  // Data path sizes
  localparam int SAMPLE_W  = 10;    // ADC sample and filtered sample width
  localparam int FS        = 256;   // samples per second
  localparam int BUF_DEPTH = 2048;  // 8 s of filtered samples
  localparam int BUF_AW    = 11;    // $clog2(BUF_DEPTH)
  localparam int PM_QW     = 4;     // bits per matrix coordinate: 16 x 16 matrix
  localparam int PM_CNT_W  = 10;    // bits per matrix cell (saturating count)
  localparam int CV_W      = 2*PM_QW + 1;  // a CV counts up to 256 cells
  localparam int CPSD_FRAC = 8;     // CPSD output fraction bits
  localparam int CPSD_W    = CV_W + CPSD_FRAC;

  // Filter
  localparam int NUM_SEC   = 4;     // biquad sections: HP, LP, notch 60 Hz, notch 120 Hz
  localparam int NUM_TAP   = 5;     // b0 b1 b2 a1 a2
  localparam int COEF_W    = 18;    // signed Q2.16
  localparam int COEF_FRAC = 16;
  localparam int FILT_GUARD = 8;    // extra fraction bits inside the filter
  localparam int FILT_W    = SAMPLE_W + FILT_GUARD;

  // Run-time defaults (programmable through the bus)
  localparam int DEF_WIN        = 1024;  // W = 4 s
  localparam int DEF_DELAY      = 8;     // d in samples
  localparam int DEF_THRESH_H   = 60;    // Threshold_valid h, in cells
  localparam int DEF_REF_PERIOD = 30;    // reference refresh, in CPSD outputs (s)
  localparam int DEF_LEVELS     = (1 << PM_QW) - 1;  // L

  // Run-time configuration seen by the controller and the data path
  typedef struct packed {
    logic [BUF_AW-1:0] win_len;     // W in samples (<= BUF_DEPTH - FS)
    logic [BUF_AW-1:0] delay_d;     // d in samples (< win_len)
    logic [CV_W-1:0]   thresh_h;    // training accepts when CV < thresh_h
    logic [BUF_AW-1:0] sps;         // samples between two CPSD outputs
    logic [7:0]        ref_period;  // CPSD outputs between reference refreshes
    logic [PM_QW-1:0]  levels;      // L of Eq. 3
  } asp_cfg_t;

  // Which phase-matrix SRAM a build writes
  typedef enum logic {PM_REF = 1'b0, PM_CUR = 1'b1} pm_sel_e;

  typedef logic signed [COEF_W-1:0] coef_t;

endpackage
