// tb_conv_pool_accel: end-to-end, full-size test of the fused convolution /
// max-pooling accelerator with all parameters at their defaults (64x64
// image, 5x5 filter, 2x2 pooling, 30x30 result).
//
// Three frames of random 8-bit pixels are streamed:
//   frame 0: filter A, pixels every cycle; with the first pixel presented in
//            cycle 0, frame_done must come in cycle 64*64 + 4, i.e. 5 cycles
//            after the last pixel;
//   frame 1: filter B, loaded after frame 0 is done, random input gaps;
//   frame 2: filter B, started back to back with frame 1, random gaps.
// A reference model in the testbench convolves and pools each frame; every
// pooled result is checked for value, coordinates and order, and each frame
// for its count. The testbench also counts how often each mechanism of the
// design was exercised (border pixels that complete no window, input gaps,
// pooling rows buffered and rows emitted, back-to-back frames, filter
// reloads, frame_done) and counts a failure for any that never happened.
module tb_conv_pool_accel;
  localparam int IMG_W = 64, IMG_H = 64, K = 5;
  localparam int CONV_W = IMG_W - K + 1, CONV_H = IMG_H - K + 1;
  localparam int OUT_W = CONV_W / 2, OUT_H = CONV_H / 2;
  localparam int FRAMES = 3;
  localparam int LATENCY = 5;  // last pixel presented -> frame_done, in cycles

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wgt_we = 1'b0;
  logic [4:0] wgt_addr = '0;
  logic signed [7:0] wgt_data = '0;
  logic in_valid = 1'b0;
  logic signed [7:0] in_pixel = '0;
  logic out_valid;
  logic signed [20:0] out_data;
  logic [4:0] out_row, out_col;
  logic frame_done;

  conv_pool_accel dut (.*);

  logic signed [7:0] img [FRAMES][IMG_H][IMG_W];
  logic signed [7:0] filt [2][K][K];
  int expected [FRAMES][OUT_H][OUT_W];

  int checks = 0, failures = 0;
  int frame = 0, er = 0, ec = 0, nout = 0;
  int cycle = 0, first_pixel_cycle = 0, done_cycle = -1;
  int n_border = 0, n_gap = 0, n_buffered_rows = 0, n_emitted_rows = 0;
  int n_back_to_back = 0, n_reload = 0, n_done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: valid convolution then 2x2 stride-2 max pooling
  function automatic void model(int f, int fi);
    int conv [CONV_H][CONV_W];
    for (int r = 0; r < CONV_H; r++)
      for (int c = 0; c < CONV_W; c++) begin
        int s;
        s = 0;
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++)
            s += int'(img[f][r + i][c + j]) * int'(filt[fi][i][j]);
        conv[r][c] = s;
      end
    for (int r = 0; r < OUT_H; r++)
      for (int c = 0; c < OUT_W; c++) begin
        int m;
        m = conv[2*r][2*c];
        if (conv[2*r][2*c+1] > m) m = conv[2*r][2*c+1];
        if (conv[2*r+1][2*c] > m) m = conv[2*r+1][2*c];
        if (conv[2*r+1][2*c+1] > m) m = conv[2*r+1][2*c+1];
        expected[f][r][c] = m;
      end
  endfunction

  // Output checker
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      checks++;
      if (frame >= FRAMES) begin
        failures++; $display("FAIL output after the last frame");
      end else if (int'(out_row) != er || int'(out_col) != ec ||
                   int'(out_data) != expected[frame][er][ec]) begin
        failures++;
        $display("FAIL frame %0d pooled (%0d,%0d)=%0d expected (%0d,%0d)=%0d",
                 frame, out_row, out_col, out_data, er, ec,
                 (frame < FRAMES) ? expected[frame][er][ec] : 0);
      end
      nout++;
      if (ec == OUT_W - 1) begin
        n_emitted_rows++;
        ec = 0;
        checks++;
        if (frame_done !== (er == OUT_H - 1)) begin
          failures++; $display("FAIL frame_done=%b at pooled row %0d", frame_done, er);
        end
        if (er == OUT_H - 1) begin
          checks++;
          if (nout != OUT_W * OUT_H) begin failures++; $display("FAIL frame %0d gave %0d results", frame, nout); end
          nout = 0; er = 0; frame++;
        end else er++;
      end else begin
        ec++;
        checks++;
        if (frame_done !== 1'b0) begin failures++; $display("FAIL early frame_done"); end
      end
    end
    if (rst_n && frame_done) begin
      n_done++;
      if (done_cycle < 0) done_cycle = cycle;
    end
  end

  task automatic load_filter(int fi);
    for (int a = 0; a < K * K; a++) begin
      @(negedge clk);
      wgt_we = 1'b1; wgt_addr = 5'(a); wgt_data = filt[fi][a / K][a % K];
    end
    @(negedge clk);
    wgt_we = 1'b0;
    n_reload++;
  endtask

  task automatic send_frame(int f, bit gaps);
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        while (gaps && $urandom_range(4) == 0) begin
          @(negedge clk); in_valid = 1'b0; n_gap++;
        end
        @(negedge clk);
        in_valid = 1'b1; in_pixel = img[f][r][c];
        if (r == 0 && c == 0) first_pixel_cycle = cycle;
        if (r < K - 1 || c < K - 1) n_border++;
        // the last window of an even convolution row: its pooling row is
        // now held in the half-row buffer until the odd row arrives
        if (r >= K - 1 && (r - (K - 1)) % 2 == 0 && c == IMG_W - 1) n_buffered_rows++;
      end
  endtask

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < IMG_H; r++)
        for (int c = 0; c < IMG_W; c++)
          img[f][r][c] = 8'($urandom);
    // frame 0 starts with a block of extreme values to exercise the full range
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        img[0][r][c] = -8'sd128;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++) begin
        filt[0][i][j] = (i == 0 && j < 2) ? -8'sd128 : 8'($urandom);
        filt[1][i][j] = 8'($urandom);
      end
    model(0, 0);
    model(1, 1);
    model(2, 1);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // frame 0: filter A, no gaps, latency measured
    load_filter(0);
    send_frame(0, 1'b0);
    @(negedge clk); in_valid = 1'b0;
    wait (frame == 1);
    checks++;
    if (done_cycle - first_pixel_cycle != IMG_W * IMG_H - 1 + LATENCY) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", done_cycle - first_pixel_cycle, IMG_W * IMG_H - 1 + LATENCY);
    end

    // frames 1 and 2: filter B, random gaps, back to back
    load_filter(1);
    send_frame(1, 1'b1);
    n_back_to_back++;
    send_frame(2, 1'b1);
    @(negedge clk); in_valid = 1'b0;
    repeat (20) @(negedge clk);

    checks++;
    if (frame != FRAMES) begin failures++; $display("FAIL %0d of %0d frames completed", frame, FRAMES); end
    $display("mechanisms: border=%0d gaps=%0d buffered_rows=%0d emitted_rows=%0d back_to_back=%0d reloads=%0d frame_done=%0d",
             n_border, n_gap, n_buffered_rows, n_emitted_rows, n_back_to_back, n_reload, n_done);
    checks++; if (n_border == 0) begin failures++; $display("FAIL no border pixels"); end
    checks++; if (n_gap == 0) begin failures++; $display("FAIL no input gaps"); end
    checks++; if (n_buffered_rows == 0) begin failures++; $display("FAIL no pooling row buffered"); end
    checks++; if (n_emitted_rows == 0) begin failures++; $display("FAIL no pooled rows emitted"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back frames"); end
    checks++; if (n_reload < 2) begin failures++; $display("FAIL filter reloaded %0d times", n_reload); end
    checks++; if (n_done != FRAMES) begin failures++; $display("FAIL frame_done pulsed %0d times", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
