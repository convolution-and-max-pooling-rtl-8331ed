// conv_mac_array: fully unrolled, pipelined K x K convolution datapath.
//
// All K*K products of a window and the filter are formed in parallel, so one
// convolution result is produced per clock (loop unrolling). The sum is split
// into three register stages (pipelining):
//   stage 1: the K*K signed products,
//   stage 2: K row sums of K products each,
//   stage 3: the sum of the K row sums.
// in_valid and the tag (the output coordinates, passed through unchanged)
// travel with the data, so out_valid/out_acc/out_tag appear exactly LATENCY=3
// cycles after in_valid/win/in_tag, and a new window may enter every cycle.
// The accumulator is wide enough for the exact sum; nothing is rounded or
// saturated. Unrolling and pipelining are the design's stated methods; the
// split into these three stages is this design's choice.
module conv_mac_array #(
  parameter int unsigned K      = cnn_pkg::K,
  parameter int unsigned DATA_W = cnn_pkg::DATA_W,
  parameter int unsigned WGT_W  = cnn_pkg::WGT_W,
  parameter int unsigned TAG_W  = 12,
  localparam int unsigned PROD_W = DATA_W + WGT_W,
  localparam int unsigned ROW_W  = PROD_W + $clog2(K),
  localparam int unsigned ACC_W  = cnn_pkg::acc_width(DATA_W, WGT_W, K * K)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] win     [K][K],
  input  logic signed [WGT_W-1:0]  weights [K][K],
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  out_acc,
  output logic [TAG_W-1:0]         out_tag
);

  localparam int unsigned LATENCY = 3;

  logic signed [PROD_W-1:0] prod    [K][K];
  logic signed [ROW_W-1:0]  row_sum [K];
  logic [LATENCY-1:0]       valid_q;
  logic [TAG_W-1:0]         tag_q [LATENCY];

  // Stage 1: K*K parallel multipliers
  always_ff @(posedge clk) begin
    for (int r = 0; r < int'(K); r++)
      for (int c = 0; c < int'(K); c++)
        prod[r][c] <= PROD_W'(win[r][c]) * PROD_W'(weights[r][c]);
  end

  // Stage 2: one adder per filter row
  always_ff @(posedge clk) begin
    for (int r = 0; r < int'(K); r++) begin
      logic signed [ROW_W-1:0] s;
      s = '0;
      for (int c = 0; c < int'(K); c++)
        s += ROW_W'(prod[r][c]);
      row_sum[r] <= s;
    end
  end

  // Stage 3: final sum
  always_ff @(posedge clk) begin
    logic signed [ACC_W-1:0] s;
    s = '0;
    for (int r = 0; r < int'(K); r++)
      s += ACC_W'(row_sum[r]);
    out_acc <= s;
  end

  // Valid and tag pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < int'(LATENCY); i++)
        tag_q[i] <= '0;
    end else begin
      valid_q <= {valid_q[LATENCY-2:0], in_valid};
      tag_q[0] <= in_tag;
      for (int i = 1; i < int'(LATENCY); i++)
        tag_q[i] <= tag_q[i-1];
    end
  end

  assign out_valid = valid_q[LATENCY-1];
  assign out_tag   = tag_q[LATENCY-1];

endmodule
