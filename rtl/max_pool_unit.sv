// max_pool_unit: 2x2, stride-2 max pooling applied on the fly to the
// convolution output stream, so the convolution result is never stored as a
// full feature map (the convolution and pooling layers are fused).
//
// Each input carries its convolution-output coordinates (in_row, in_col).
// At an even column the value is held; at the following odd column the
// larger of the pair is formed. On an even row that horizontal maximum is
// written to a half-row buffer of CONV_W/2 partial maxima; on the odd row
// below it is compared with the buffered value and the 2x2 maximum leaves
// the unit. A trailing odd row or column (odd CONV_W or CONV_H) is dropped,
// as stride-2 pooling without padding does.
//
// Interface: inputs must arrive in raster order, gaps allowed. out_valid,
// out_data and the pooled coordinates out_row = in_row/2, out_col = in_col/2
// appear one cycle after the input that completes the 2x2 window. The pool
// size follows the design's 2x2 target; the buffer organisation and the
// coordinate-driven control are this design's choice.
module max_pool_unit #(
  parameter int unsigned CONV_W = cnn_pkg::CONV_W,
  parameter int unsigned CONV_H = cnn_pkg::CONV_H,
  parameter int unsigned ACC_W  = cnn_pkg::ACC_W,
  localparam int unsigned COL_W  = $clog2(CONV_W),
  localparam int unsigned ROW_W  = $clog2(CONV_H),
  localparam int unsigned HALF_W = CONV_W / 2,
  localparam int unsigned HALF_H = CONV_H / 2,
  localparam int unsigned PCOL_W = (HALF_W > 1) ? $clog2(HALF_W) : 1,
  localparam int unsigned PROW_W = (HALF_H > 1) ? $clog2(HALF_H) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] in_data,
  input  logic [ROW_W-1:0]        in_row,
  input  logic [COL_W-1:0]        in_col,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_data,
  output logic [PROW_W-1:0]       out_row,
  output logic [PCOL_W-1:0]       out_col
);

  logic signed [ACC_W-1:0] held;              // value from the even column
  logic signed [ACC_W-1:0] row_buf [HALF_W];  // horizontal maxima of the even row
  logic signed [ACC_W-1:0] hmax;
  logic signed [ACC_W-1:0] buf_val;
  logic [PCOL_W-1:0]       pcol;
  logic                    in_range;

  assign pcol     = PCOL_W'(in_col >> 1);
  assign in_range = (in_row < ROW_W'(HALF_H * 2)) && (in_col < COL_W'(HALF_W * 2));
  assign hmax     = (in_data > held) ? in_data : held;
  assign buf_val  = row_buf[pcol];

  always_ff @(posedge clk) begin
    if (in_valid && in_range) begin
      if (!in_col[0])
        held <= in_data;
      else if (!in_row[0])
        row_buf[pcol] <= hmax;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= in_valid && in_range && in_col[0] && in_row[0];
      if (in_valid && in_range && in_col[0] && in_row[0]) begin
        out_data <= (hmax > buf_val) ? hmax : buf_val;
        out_row  <= PROW_W'(in_row >> 1);
        out_col  <= pcol;
      end
    end
  end

endmodule
