// tb_window_buffer: self-checking test of the line buffer / window former.
// Streams three small frames (11 x 9 pixels, 5x5 windows) back to back with
// random gaps, keeps a copy of every frame, and checks that windows appear in
// raster order, one cycle after the completing pixel, with every one of the
// 25 pixels equal to the image pixel it stands for, and that each frame
// yields exactly (11-5+1) x (9-5+1) windows.
module tb_window_buffer;
  localparam int unsigned IMG_W = 11;
  localparam int unsigned IMG_H = 9;
  localparam int unsigned K = 5;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned FRAMES = 3;
  localparam int unsigned COL_W = $clog2(IMG_W);
  localparam int unsigned ROW_W = $clog2(IMG_H);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_pixel = '0;
  logic win_valid;
  logic signed [DATA_W-1:0] win [K][K];
  logic [ROW_W-1:0] win_row;
  logic [COL_W-1:0] win_col;

  logic signed [DATA_W-1:0] img [FRAMES][IMG_H][IMG_W];
  int checks = 0, failures = 0;
  int frame = 0, exp_r = 0, exp_c = 0, nwin = 0;
  bit expect_win = 0;   // the pixel accepted on the last edge completes a window
  int gaps = 0;

  window_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: runs just after each rising edge
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (win_valid !== expect_win) begin
        failures++; $display("FAIL win_valid=%b expected %b (frame %0d)", win_valid, expect_win, frame);
      end
      if (win_valid && expect_win) begin
        checks++;
        if (int'(win_row) != exp_r || int'(win_col) != exp_c) begin
          failures++; $display("FAIL window at (%0d,%0d) expected (%0d,%0d)", win_row, win_col, exp_r, exp_c);
        end
        for (int r = 0; r < int'(K); r++)
          for (int c = 0; c < int'(K); c++) begin
            checks++;
            if (win[r][c] !== img[frame][exp_r + r][exp_c + c]) begin
              failures++;
              $display("FAIL frame %0d window (%0d,%0d) pixel (%0d,%0d)=%0d expected %0d",
                       frame, exp_r, exp_c, r, c, win[r][c], img[frame][exp_r + r][exp_c + c]);
            end
          end
        nwin++;
        if (exp_c == int'(IMG_W - K)) begin
          exp_c = 0;
          if (exp_r == int'(IMG_H - K)) begin
            exp_r = 0;
            checks++;
            if (nwin != int'((IMG_W - K + 1) * (IMG_H - K + 1))) begin
              failures++; $display("FAIL frame %0d had %0d windows", frame, nwin);
            end
            nwin = 0;
            frame++;
          end else exp_r++;
        end else exp_c++;
      end
    end
  end

  initial begin
    for (int f = 0; f < int'(FRAMES); f++)
      for (int r = 0; r < int'(IMG_H); r++)
        for (int c = 0; c < int'(IMG_W); c++)
          img[f][r][c] = DATA_W'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < int'(FRAMES); f++)
      for (int r = 0; r < int'(IMG_H); r++)
        for (int c = 0; c < int'(IMG_W); c++) begin
          // frame 0 uninterrupted, later frames with random gaps
          while (f > 0 && $urandom_range(3) == 0) begin
            @(negedge clk);
            in_valid = 1'b0; expect_win = 0; gaps++;
          end
          @(negedge clk);
          in_valid = 1'b1; in_pixel = img[f][r][c];
          expect_win = (r >= int'(K - 1)) && (c >= int'(K - 1));
        end
    @(negedge clk);
    in_valid = 1'b0; expect_win = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (frame != int'(FRAMES)) begin failures++; $display("FAIL only %0d frames completed", frame); end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL no input gaps were exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
