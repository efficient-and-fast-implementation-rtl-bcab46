// tof_pkg: types and constants shared by the time-of-flight ranging pipeline.
// A pixel of the sensor is 12 bits; the four differential correction samples
// (DCS0..DCS3) of one pixel travel together as a dcs_tuple_t. Phase and
// distance are kept as unsigned 24-bit fractions of one turn (of the
// unambiguous range), so the modulo wrap of the distance is free.
package tof_pkg;
  localparam int unsigned DCS_W   = 12;   // sensor pixel width (DATA[11:0])
  localparam int unsigned PHASE_W = 24;   // phase / distance fraction width
  localparam int unsigned AMP_W   = 12;   // amplitude width
  localparam int unsigned DIFF_W  = DCS_W + 1;

  typedef logic [DCS_W-1:0] dcs_t;

  // Four DCS of one pixel, for modulation frequency A and (two-frequency
  // mode) frequency B, with stream framing.
  typedef struct packed {
    dcs_t [3:0] a;
    dcs_t [3:0] b;
    logic       sof;   // first pixel of the frame
    logic       eof;   // last pixel of the frame
  } dcs_tuple_t;

  // Morphological filter modes.
  typedef enum logic [1:0] {
    MORPH_PASS   = 2'd0,
    MORPH_ERODE  = 2'd1,
    MORPH_DILATE = 2'd2
  } morph_mode_e;

  // Auto integration-time verdict on the last frame.
  typedef enum logic [1:0] {
    EXPO_GOOD = 2'd0,
    EXPO_WEAK = 2'd1,
    EXPO_OVER = 2'd2
  } expo_e;

  // Run-time configuration, written by the configuration processor.
  typedef struct packed {
    logic              dual_freq;    // two-frequency unwrapping on
    logic              median_en;    // 3x3 median on the distance image
    morph_mode_e       morph_mode;   // erosion/dilation of the valid mask
    logic [AMP_W-1:0]  amp_min;      // amplitude below which a pixel is invalid
    logic [PHASE_W-1:0] d_offset;    // calibration offset (signed, turns*2^24)
    logic [15:0]       du_mm;        // unambiguous range in mm
    logic [15:0]       t_ref;        // calibration temperature
    logic [15:0]       k_temp;       // temperature coefficient (signed)
  } tof_cfg_t;
endpackage
