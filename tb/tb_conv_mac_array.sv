// tb_conv_mac_array: self-checking test of the unrolled, pipelined 5x5
// multiply-accumulate array. Random windows, weights and tags enter with
// random valid; every cycle the outputs are compared with a reference sum
// computed in the testbench three cycles earlier, which checks the values,
// the tag pass-through, one result per cycle and the 3-cycle latency.
module tb_conv_mac_array;
  localparam int unsigned K = 5;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned WGT_W = 8;
  localparam int unsigned TAG_W = 12;
  localparam int unsigned ACC_W = DATA_W + WGT_W + $clog2(K * K);
  localparam int unsigned LAT = 3;
  localparam int unsigned N = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] win [K][K];
  logic signed [WGT_W-1:0] weights [K][K];
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] out_acc;
  logic [TAG_W-1:0] out_tag;

  bit exp_valid [N + LAT + 1];
  longint exp_acc [N + LAT + 1];
  int exp_tag [N + LAT + 1];
  int checks = 0, failures = 0, results = 0;

  conv_mac_array #(.K(K), .DATA_W(DATA_W), .WGT_W(WGT_W), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < int'(K); r++)
      for (int c = 0; c < int'(K); c++) begin
        win[r][c] = '0; weights[r][c] = '0;
      end
    for (int t = 0; t < int'(N + LAT + 1); t++) exp_valid[t] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < int'(N + LAT); t++) begin
      // drive cycle t
      if (t < int'(N)) begin
        longint s;
        int mode;
        s = 0;
        mode = t % 50;
        in_valid = ($urandom_range(3) != 0);
        in_tag = TAG_W'($urandom);
        for (int r = 0; r < int'(K); r++)
          for (int c = 0; c < int'(K); c++) begin
            if (mode == 0) begin win[r][c] = -8'sd128; weights[r][c] = -8'sd128; end
            else if (mode == 1) begin win[r][c] = -8'sd128; weights[r][c] = 8'sd127; end
            else begin win[r][c] = DATA_W'($urandom); weights[r][c] = WGT_W'($urandom); end
            s += longint'(win[r][c]) * longint'(weights[r][c]);
          end
        exp_valid[t] = in_valid; exp_acc[t] = s; exp_tag[t] = int'(in_tag);
      end else begin
        in_valid = 1'b0;
      end
      @(posedge clk);
      #1;
      // after edge t the output holds what entered at cycle t+1-LAT
      if (t + 1 >= int'(LAT)) begin
        int k;
        k = t + 1 - int'(LAT);
        checks++;
        if (out_valid !== exp_valid[k]) begin
          failures++; $display("FAIL valid at input %0d: %b", k, out_valid);
        end else if (exp_valid[k]) begin
          results++;
          checks++;
          if (longint'(out_acc) != exp_acc[k] || int'(out_tag) != exp_tag[k]) begin
            failures++;
            $display("FAIL input %0d: acc=%0d exp=%0d tag=%0d exp=%0d", k, out_acc, exp_acc[k], out_tag, exp_tag[k]);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (results < int'(N / 2)) begin failures++; $display("FAIL only %0d results", results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
