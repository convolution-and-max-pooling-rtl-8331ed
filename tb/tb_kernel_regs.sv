// tb_kernel_regs: self-checking test of the filter weight register file.
// Checks the reset value, that every address lands on its own (row, col),
// that a write is visible on the next edge and leaves the other weights
// alone, and that out-of-range addresses change nothing.
module tb_kernel_regs;
  localparam int unsigned K = 5;
  localparam int unsigned WGT_W = 8;
  localparam int unsigned ADDR_W = $clog2(K * K);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0;
  logic signed [WGT_W-1:0] wr_data = '0;
  logic signed [WGT_W-1:0] weights [K][K];
  logic signed [WGT_W-1:0] model [K][K];
  int checks = 0, failures = 0;

  kernel_regs #(.K(K), .WGT_W(WGT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int r = 0; r < int'(K); r++)
      for (int c = 0; c < int'(K); c++) begin
        checks++;
        if (weights[r][c] !== model[r][c]) begin
          failures++;
          $display("FAIL %s: w[%0d][%0d]=%0d expected %0d", what, r, c, weights[r][c], model[r][c]);
        end
      end
  endtask

  task automatic write(int addr, logic signed [WGT_W-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = ADDR_W'(addr); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
    if (addr < int'(K * K)) model[addr / K][addr % K] = d;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < int'(K); r++) for (int c = 0; c < int'(K); c++) model[r][c] = '0;
    repeat (3) @(negedge clk);
    compare("reset");
    rst_n = 1'b1;
    // write each address with a distinct value, checking after each write
    for (int a = 0; a < int'(K * K); a++) begin
      write(a, WGT_W'(a * 7 - 90));
      compare("sequential write");
    end
    // random overwrites, including the extreme values
    for (int i = 0; i < 200; i++) begin
      int a;
      logic signed [WGT_W-1:0] d;
      a = int'($urandom_range(K * K - 1));
      d = (i % 10 == 0) ? -8'sd128 : WGT_W'($urandom);
      write(a, d);
      compare("random write");
    end
    // out-of-range addresses must be ignored
    for (int a = K * K; a < (1 << ADDR_W); a++) begin
      write(a, 8'sd55);
      compare("out of range");
    end
    // holding wr_en low keeps everything
    @(negedge clk); wr_addr = '0; wr_data = 8'sd99;
    repeat (3) @(negedge clk);
    compare("idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
