// Shared types and constants of the back-projection accelerator.
//
// Fixed-point conventions (sign + integer bits + fraction bits):
//   distance group  : 40-bit signed, 25 fraction bits (platform and pixel
//                     coordinates, coordinate differences, range R)
//   data group      : 24-bit signed, 22 fraction bits (radar samples,
//                     interpolated samples, matched filter values)
//   products        : 48-bit signed, 44 fraction bits
//   accumulators    : 64-bit signed, 44 fraction bits
// The widths follow the word-length study of the design; the constant
// encodings (R0, 2ku, Z1, 2*pi, pixel spacing) use the same scaling as the
// signals they are combined with.
package bp_pkg;

  localparam int unsigned POS_W     = 40;  // distance-group word
  localparam int unsigned POS_FRAC  = 25;
  localparam int unsigned SQ_W      = 80;  // square of a distance word
  localparam int unsigned RAD_W     = 78;  // radicand fed to the square root
  localparam int unsigned DATA_W    = 24;  // data-group word
  localparam int unsigned DATA_FRAC = 22;
  localparam int unsigned PROD_W    = 48;
  localparam int unsigned ACC_W     = 64;
  localparam int unsigned WORD_W    = 64;  // AXI-Stream / BRAM word

  typedef logic signed [POS_W-1:0]  dist_t;
  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [PROD_W-1:0] prod_lane_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Complex value of the data group: re in [23:0], im in [47:24].
  typedef struct packed {
    data_t im;
    data_t re;
  } cplx_t;

  // Complex product: re in [47:0], im in [95:48].
  typedef struct packed {
    prod_lane_t im;
    prod_lane_t re;
  } cprod_t;

  // Control that travels with every item down the pipeline.
  //   valid : the stage holds a real (pixel, pulse) pair
  //   sw    : the item is the last pixel of the region for this pulse,
  //           after it the sample memory switches bank
  typedef struct packed {
    logic valid;
    logic sw;
  } ctrl_t;

  // Default data-set constants.
  // R0 = 9936 m (minimum range of the sample window), 15.25 format.
  localparam logic signed [POS_W-1:0] R0_DEFAULT     = 40'sh4D_A000_0000;
  // 2*ku expressed in laps of the unit circle per metre:
  // 2 * 33.333 / (2*pi) = 10.6102..., unsigned 7.57 format.
  localparam logic [63:0]             TWO_KU_DEFAULT = 64'h1538_6F34_CB28_2200;
  // 2*pi, unsigned 3.61 format.
  localparam logic [63:0]             TWO_PI         = 64'hC90F_DAA2_2168_C000;
  // Z1 = (platform height)^2 = 50 000 000.837 m^2, 29.50 format.
  localparam logic [SQ_W-2:0]         Z1_DEFAULT     = 79'hBEBC_2035_9168_7000_000;
  // Pixel spacing dxdy = 0.25 m, 15.25 format.
  localparam logic signed [POS_W-1:0] DXDY_DEFAULT   = 40'sh00_0080_0000;

endpackage
