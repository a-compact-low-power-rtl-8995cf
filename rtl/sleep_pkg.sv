// sleep_pkg: types and constants shared by the sleep stage classifier.
//
// The classifier reads three bio-signal channels (two EEG, one EMG) through one
// shared filter. The channel numbering below also fixes the order of the
// coefficient sets in the coefficient ROM (offsets 0, 32, 64) and of the FIR
// delay lines in the shared FIR RAM (offsets 0, 64, 128). The sizes are the
// reference design's (8-bit data and coefficients, 15-bit products, 16-bit sums,
// 64 taps, 512-entry averaging windows); the channel and stage encodings are
// this design's own choice.
package sleep_pkg;

  // Channel select (2 bits).
  //   EEG1 = cortex EEG, band 0-4 Hz at 200 S/s      (filter mode 1)
  //   EEG2 = hippocampus EEG, band 5-10 Hz at 200 S/s (filter mode 2)
  //   EMG  = neck EMG, band 100-200 Hz at 800 S/s     (filter mode 3)
  typedef enum logic [1:0] {
    CH_EEG1 = 2'd0,
    CH_EEG2 = 2'd1,
    CH_EMG  = 2'd2
  } channel_e;

  // Sleep stage output (2 bits).
  typedef enum logic [1:0] {
    STAGE_AWAKE = 2'd0,
    STAGE_NREM  = 2'd1,
    STAGE_REM   = 2'd2
  } stage_e;

  localparam int unsigned DATA_W    = 8;    // sample and filter output width
  localparam int unsigned COEF_W    = 8;    // coefficient width
  localparam int unsigned PROD_W    = 15;   // multiplier output width
  localparam int unsigned ACC_W     = 16;   // summation width
  localparam int unsigned FIR_TAPS  = 64;   // FIR order
  localparam int unsigned AVG_LEN   = 512;  // averaging window entries
  localparam int unsigned RAM_AW    = 9;    // RAM address width
  localparam int unsigned ROM_AW    = 7;    // coefficient ROM address width
  localparam int unsigned N_CHAN    = 3;

endpackage
