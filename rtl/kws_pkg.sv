// kws_pkg: sizes and types shared by the keyword-spotting accelerator.
//
// The accelerator runs one single-channel 3x3 convolution over an input
// feature map (MFCC frames x coefficients), a ReLU and one fully connected
// layer that produces one score (logit) per keyword class. The 3x3 kernel
// follows the published design. The map size, the class count and the
// number formats are this design's own choices: a 49 x 10 MFCC map and 12
// classes (the common speech-commands set-up), signed 8-bit pixels and
// weights, and full-precision accumulation everywhere after that.
package kws_pkg;

  // Convolution kernel edge (3x3 window).
  localparam int unsigned KSIZE       = 3;
  // Input feature map: rows (frames) and columns (coefficients).
  localparam int unsigned IMG_H       = 49;
  localparam int unsigned IMG_W       = 10;
  // Keyword classes scored by the FC layer.
  localparam int unsigned NUM_CLASSES = 12;
  // Signed pixel and weight width.
  localparam int unsigned DATA_W      = 8;

  // Which on-chip store a load-port write goes to.
  typedef enum logic [1:0] {
    LD_FEATURE = 2'd0,   // input feature map, raster order
    LD_CONV_W  = 2'd1,   // 9 convolution weights, row-major
    LD_FC_W    = 2'd2    // FC weights, class-major: addr = class*N + input
  } ld_sel_e;

  // Accelerator phases seen by the controller.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_CONV = 2'd1,   // convolution + ReLU stream into the activation buffer
    ST_FC   = 2'd2,   // fully connected nested loop
    ST_DONE = 2'd3    // results latched, output_valid pulsed
  } kws_state_e;

  // Width of a full-precision 3x3 convolution sum of DW-bit products.
  function automatic int unsigned conv_width(int unsigned dw, int unsigned k);
    return 2 * dw + $clog2(k * k);
  endfunction

endpackage
