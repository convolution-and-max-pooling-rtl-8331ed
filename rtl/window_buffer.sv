// window_buffer: turns a raster-order pixel stream into K x K convolution
// windows, so the image is read once and never re-fetched.
//
// K-1 line memories, each IMG_W pixels deep, keep the previous K-1 image
// rows. When a pixel at column c is accepted, the K pixels of column c (the
// K-1 stored ones plus the new one) form a new window column; it is shifted
// into a K x K register window from the right while every line memory moves
// its column-c entry down one line. A window is complete once at least K rows
// and K columns of the current row have arrived, so an image of IMG_W x IMG_H
// pixels yields (IMG_W-K+1) x (IMG_H-K+1) windows: stride 1, no padding.
//
// Interface: in_valid/in_pixel carry one pixel per accepted cycle, row by
// row; gaps (in_valid low) are allowed and freeze the buffer. The pixel
// counters wrap after IMG_W x IMG_H pixels, so frames may follow back to back.
// win_valid rises one cycle after the pixel that completes a window; win[r][c]
// is then image pixel (win_row + r, win_col + c), where win_row/win_col are
// the coordinates of the window's top-left pixel, i.e. of the convolution
// output it produces.
//
// The line-buffer organisation serves the goal of keeping intermediate data
// on chip; its exact form (column-addressed line memories that shift a column down, a
// register window) is this design's choice.
module window_buffer #(
  parameter int unsigned IMG_W  = cnn_pkg::IMG_W,
  parameter int unsigned IMG_H  = cnn_pkg::IMG_H,
  parameter int unsigned K      = cnn_pkg::K,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W,
  localparam int unsigned COL_W = $clog2(IMG_W),
  localparam int unsigned ROW_W = $clog2(IMG_H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_pixel,
  output logic                     win_valid,
  output logic signed [DATA_W-1:0] win [K][K],
  output logic [ROW_W-1:0]         win_row,
  output logic [COL_W-1:0]         win_col
);

  // Position of the next incoming pixel
  logic [COL_W-1:0] col;
  logic [ROW_W-1:0] row;

  // lines[0] holds the row just above the current one, lines[K-2] the oldest
  logic signed [DATA_W-1:0] lines [K-1][IMG_W];

  // New window column, top (oldest row) first
  logic signed [DATA_W-1:0] new_col [K];

  always_comb begin
    for (int r = 0; r < int'(K) - 1; r++)
      new_col[r] = lines[K-2-r][col];
    new_col[K-1] = in_pixel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (in_valid) begin
      if (col == COL_W'(IMG_W - 1)) begin
        col <= '0;
        row <= (row == ROW_W'(IMG_H - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  // Line memories: each shifts the current column down by one line
  always_ff @(posedge clk) begin
    if (in_valid) begin
      lines[0][col] <= in_pixel;
      for (int l = 1; l < int'(K) - 1; l++)
        lines[l][col] <= lines[l-1][col];
    end
  end

  // Register window: shift left, new column enters on the right
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(K); r++)
        for (int c = 0; c < int'(K); c++)
          win[r][c] <= '0;
    end else if (in_valid) begin
      for (int r = 0; r < int'(K); r++) begin
        for (int c = 0; c < int'(K) - 1; c++)
          win[r][c] <= win[r][c+1];
        win[r][K-1] <= new_col[r];
      end
    end
  end

  // Window status, aligned with the register window
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      win_row   <= '0;
      win_col   <= '0;
    end else begin
      win_valid <= in_valid && (row >= ROW_W'(K - 1)) && (col >= COL_W'(K - 1));
      if (in_valid) begin
        win_row <= row - ROW_W'(K - 1);
        win_col <= col - COL_W'(K - 1);
      end
    end
  end

endmodule
