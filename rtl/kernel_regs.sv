// kernel_regs: register file holding the K x K filter weights.
//
// The host writes one weight per cycle: wr_en with wr_addr = r*K + c places
// wr_data at filter row r, column c. All weights are visible in parallel on
// weights[][], which feeds the unrolled multiplier array directly; a write
// takes effect on the next clock edge. Reset clears every weight to zero.
// Addresses of K*K and above are ignored. The filter size follows the
// design's 5x5 target; the write port is this design's choice.
module kernel_regs #(
  parameter int unsigned K      = cnn_pkg::K,
  parameter int unsigned WGT_W  = cnn_pkg::WGT_W,
  localparam int unsigned ADDR_W = $clog2(K * K)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [ADDR_W-1:0]       wr_addr,
  input  logic signed [WGT_W-1:0] wr_data,
  output logic signed [WGT_W-1:0] weights [K][K]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(K); r++)
        for (int c = 0; c < int'(K); c++)
          weights[r][c] <= '0;
    end else if (wr_en) begin
      for (int r = 0; r < int'(K); r++)
        for (int c = 0; c < int'(K); c++)
          if (wr_addr == ADDR_W'(r * K + c))
            weights[r][c] <= wr_data;
    end
  end

endmodule
