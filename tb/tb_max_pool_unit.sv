// tb_max_pool_unit: self-checking test of the streaming 2x2 max-pooling
// stage. A 7 x 5 stream of random signed values (odd in both directions, so
// the last row and column must be dropped) is sent twice in raster order,
// the second time with random gaps. Each pooled result is checked against
// the maximum of its 2x2 group, its coordinates, its order, and its
// 1-cycle latency after the completing input.
module tb_max_pool_unit;
  localparam int unsigned CONV_W = 7;
  localparam int unsigned CONV_H = 5;
  localparam int unsigned ACC_W = 21;
  localparam int unsigned COL_W = $clog2(CONV_W);
  localparam int unsigned ROW_W = $clog2(CONV_H);
  localparam int unsigned OW = CONV_W / 2;
  localparam int unsigned OH = CONV_H / 2;
  localparam int unsigned PCOL_W = (OW > 1) ? $clog2(OW) : 1;
  localparam int unsigned PROW_W = (OH > 1) ? $clog2(OH) : 1;
  localparam int unsigned PASSES = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [ACC_W-1:0] in_data = '0;
  logic [ROW_W-1:0] in_row = '0;
  logic [COL_W-1:0] in_col = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] out_data;
  logic [PROW_W-1:0] out_row;
  logic [PCOL_W-1:0] out_col;

  int checks = 0, failures = 0, pooled = 0, gaps = 0;
  logic signed [ACC_W-1:0] m [PASSES][CONV_H][CONV_W];
  bit expect_out = 0;
  logic signed [ACC_W-1:0] exp_val;
  int exp_r, exp_c;

  max_pool_unit #(.CONV_W(CONV_W), .CONV_H(CONV_H), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== expect_out) begin
        failures++; $display("FAIL out_valid=%b expected %b", out_valid, expect_out);
      end else if (expect_out) begin
        checks++;
        pooled++;
        if (out_data !== exp_val || int'(out_row) != exp_r || int'(out_col) != exp_c) begin
          failures++;
          $display("FAIL pooled (%0d,%0d)=%0d expected (%0d,%0d)=%0d", out_row, out_col, out_data, exp_r, exp_c, exp_val);
        end
      end
    end
  end

  function automatic logic signed [ACC_W-1:0] max4(int p, int r, int c);
    logic signed [ACC_W-1:0] x;
    x = m[p][r][c];
    if (m[p][r][c+1] > x) x = m[p][r][c+1];
    if (m[p][r+1][c] > x) x = m[p][r+1][c];
    if (m[p][r+1][c+1] > x) x = m[p][r+1][c+1];
    return x;
  endfunction

  initial begin
    for (int p = 0; p < int'(PASSES); p++)
      for (int r = 0; r < int'(CONV_H); r++)
        for (int c = 0; c < int'(CONV_W); c++)
          m[p][r][c] = (p == 0 && r == 0) ? -ACC_W'(1000 + c) : ACC_W'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < int'(PASSES); p++)
      for (int r = 0; r < int'(CONV_H); r++)
        for (int c = 0; c < int'(CONV_W); c++) begin
          while (p > 0 && $urandom_range(2) == 0) begin
            @(negedge clk); in_valid = 1'b0; expect_out = 0; gaps++;
          end
          @(negedge clk);
          in_valid = 1'b1; in_data = m[p][r][c];
          in_row = ROW_W'(r); in_col = COL_W'(c);
          expect_out = (r % 2 == 1) && (c % 2 == 1) && (r < int'(OH * 2)) && (c < int'(OW * 2));
          if (expect_out) begin
            exp_val = max4(p, r - 1, c - 1); exp_r = r / 2; exp_c = c / 2;
          end
        end
    @(negedge clk);
    in_valid = 1'b0; expect_out = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (pooled != int'(PASSES * OW * OH)) begin failures++; $display("FAIL %0d pooled results", pooled); end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL no gaps exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
