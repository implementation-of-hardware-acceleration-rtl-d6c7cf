// aod_pkg: types and constants shared by the quantized AOD-Net defogging core.
//
// Activations are 8-bit unsigned integers (TFLite-style asymmetric quantization,
// r = S*(q - Z)); weights are 5-bit unsigned integers with a per-layer zero point,
// the weight width chosen for this core. Each convolution layer is configured
// at run time with a qparam_t: the zero points of its input, weights and output,
// and the output rescale S_in*S_w/S_out expressed as an integer multiplier and a
// right shift. The 8-bit activation width and the multiplier/shift encoding are
// this design's choice.
package aod_pkg;

  localparam int unsigned DBITS   = 8;   // activation width
  localparam int unsigned WBITS   = 5;   // weight width
  localparam int unsigned ACCBITS = 32;  // accumulator / bias width
  localparam int unsigned MBITS   = 16;  // requantization multiplier width
  localparam int unsigned SBITS   = 6;   // requantization shift width

  typedef logic [DBITS-1:0] pix_t;
  typedef logic [WBITS-1:0] wgt_t;
  typedef logic signed [ACCBITS-1:0] acc_t;

  // Run-time quantization constants of one convolution layer.
  typedef struct packed {
    pix_t             zx;  // input zero point
    wgt_t             zw;  // weight zero point
    pix_t             zy;  // output zero point (also the ReLU floor)
    logic [MBITS-1:0] m;   // rescale multiplier
    logic [SBITS-1:0] sh;  // rescale right shift
  } qparam_t;

  // Register map inside one layer's 2048-word window (word addresses).
  localparam int unsigned REG_BIAS = 1024;  // 1024 + output channel
  localparam int unsigned REG_ZX   = 1040;
  localparam int unsigned REG_ZW   = 1041;
  localparam int unsigned REG_ZY   = 1042;
  localparam int unsigned REG_M    = 1043;
  localparam int unsigned REG_SH   = 1044;
  localparam int unsigned CFG_AW   = 11;    // address bits inside one window

  // Registers of the recovery stage (window 0).
  localparam int unsigned REG_ZK   = 0;
  localparam int unsigned REG_MK   = 1;
  localparam int unsigned REG_SK   = 2;

endpackage
