// cnn_pkg: sizes and types shared by the fused convolution / max-pooling
// accelerator.
//
// The accelerator convolves one 64x64 single-channel image with one 5x5
// filter (stride 1, no padding) and max-pools the 60x60 result with a 2x2
// window of stride 2, giving a 30x30 feature map. The image, filter and pool
// sizes are the ones the design targets; the number formats (8-bit signed
// pixels and weights, full-precision accumulator) are this design's choice.
package cnn_pkg;

  // Image and layer geometry
  localparam int unsigned IMG_W  = 64;   // input image width
  localparam int unsigned IMG_H  = 64;   // input image height
  localparam int unsigned K      = 5;    // filter is K x K

  // Number formats
  localparam int unsigned DATA_W = 8;    // signed pixel width
  localparam int unsigned WGT_W  = 8;    // signed weight width

  // Width that holds the exact sum of n products of a-bit and b-bit signed values.
  function automatic int unsigned acc_width(int unsigned a, int unsigned b, int unsigned n);
    return a + b + $clog2(n);
  endfunction

  localparam int unsigned ACC_W  = acc_width(DATA_W, WGT_W, K * K);

  // Convolution output size, the input of the (fixed) 2x2 max pooling
  localparam int unsigned CONV_W = IMG_W - K + 1;   // 60
  localparam int unsigned CONV_H = IMG_H - K + 1;   // 60

endpackage
