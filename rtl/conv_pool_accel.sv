// conv_pool_accel: fused convolution and max-pooling layer accelerator.
//
// One single-channel IMG_W x IMG_H image streams in, one pixel per accepted
// cycle, in raster order. A line buffer (window_buffer) forms a K x K window
// around every pixel that completes one; a fully unrolled, pipelined
// multiplier array (conv_mac_array) convolves it with the filter held in
// kernel_regs, producing one convolution result per cycle; and the result
// goes straight into the pooling stage (max_pool_unit) instead of being
// written back to memory. The output is the (IMG_W-K+1)/2 x (IMG_H-K+1)/2
// map of 2x2 maxima (30x30 for the default 64x64 image and 5x5 filter).
// Unrolling, pipelining and the fusion of the two layers are the three
// methods the design is built around; the stream interfaces, the number
// formats and the pipeline depth are this design's choices.
//
// Interface:
//   wgt_we/wgt_addr/wgt_data  write filter weight (r, c) at address r*K + c;
//                              load the filter before streaming a frame
//   in_valid/in_pixel          pixel stream, gaps allowed, no back-pressure;
//                              frames follow each other back to back
//   out_valid/out_data         pooled results in raster order with their
//   out_row/out_col            pooled-map coordinates
//   frame_done                 pulses with the last pooled result of a frame
// Timing: a pooled result is on the outputs 5 cycles after the cycle in
// which the pixel completing its 2x2 group of windows is presented (the edge
// that accepts the pixel also forms the window, then 3 multiply-add stages
// and 1 pooling stage). An uninterrupted frame presented in cycles
// 0 .. IMG_W*IMG_H-1 therefore raises frame_done in cycle IMG_W*IMG_H + 4.
module conv_pool_accel #(
  parameter int unsigned IMG_W  = cnn_pkg::IMG_W,
  parameter int unsigned IMG_H  = cnn_pkg::IMG_H,
  parameter int unsigned K      = cnn_pkg::K,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W,
  parameter int unsigned WGT_W  = cnn_pkg::WGT_W,
  localparam int unsigned ACC_W   = cnn_pkg::acc_width(DATA_W, WGT_W, K * K),
  localparam int unsigned CONV_W  = IMG_W - K + 1,
  localparam int unsigned CONV_H  = IMG_H - K + 1,
  localparam int unsigned OUT_W   = CONV_W / 2,
  localparam int unsigned OUT_H   = CONV_H / 2,
  localparam int unsigned ADDR_W  = $clog2(K * K),
  localparam int unsigned ICOL_W  = $clog2(IMG_W),
  localparam int unsigned IROW_W  = $clog2(IMG_H),
  localparam int unsigned CCOL_W  = $clog2(CONV_W),
  localparam int unsigned CROW_W  = $clog2(CONV_H),
  localparam int unsigned OCOL_W  = $clog2(OUT_W),
  localparam int unsigned OROW_W  = $clog2(OUT_H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wgt_we,
  input  logic [ADDR_W-1:0]        wgt_addr,
  input  logic signed [WGT_W-1:0]  wgt_data,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_pixel,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  out_data,
  output logic [OROW_W-1:0]        out_row,
  output logic [OCOL_W-1:0]        out_col,
  output logic                     frame_done
);

  localparam int unsigned TAG_W = CROW_W + CCOL_W;

  logic signed [WGT_W-1:0]  weights [K][K];
  logic                     win_valid;
  logic signed [DATA_W-1:0] win [K][K];
  logic [IROW_W-1:0]        win_row;
  logic [ICOL_W-1:0]        win_col;
  logic                     conv_valid;
  logic signed [ACC_W-1:0]  conv_acc;
  logic [TAG_W-1:0]         conv_tag;

  kernel_regs #(.K(K), .WGT_W(WGT_W)) u_kernel (
    .clk, .rst_n,
    .wr_en   (wgt_we),
    .wr_addr (wgt_addr),
    .wr_data (wgt_data),
    .weights (weights)
  );

  window_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .DATA_W(DATA_W)) u_window (
    .clk, .rst_n,
    .in_valid, .in_pixel,
    .win_valid, .win, .win_row, .win_col
  );

  conv_mac_array #(.K(K), .DATA_W(DATA_W), .WGT_W(WGT_W), .TAG_W(TAG_W)) u_mac (
    .clk, .rst_n,
    .in_valid  (win_valid),
    .win       (win),
    .weights   (weights),
    .in_tag    ({CROW_W'(win_row), CCOL_W'(win_col)}),
    .out_valid (conv_valid),
    .out_acc   (conv_acc),
    .out_tag   (conv_tag)
  );

  max_pool_unit #(.CONV_W(CONV_W), .CONV_H(CONV_H), .ACC_W(ACC_W)) u_pool (
    .clk, .rst_n,
    .in_valid  (conv_valid),
    .in_data   (conv_acc),
    .in_row    (conv_tag[TAG_W-1 -: CROW_W]),
    .in_col    (conv_tag[CCOL_W-1:0]),
    .out_valid, .out_data, .out_row, .out_col
  );

  assign frame_done = out_valid && (out_row == OROW_W'(OUT_H - 1))
                                && (out_col == OCOL_W'(OUT_W - 1));

endmodule
