// tb_sdct_regimes: the full-size SDCT (N_MAX = 32) in the 2x, 4x and 8x steering
// clock regimes. Each regime halves the number of lifting rotators (LANES = 8,
// 4, 2 instead of 16) and runs clk_st at 2, 4 or 8 times the DCT clock, so a
// block takes 2, 4 or 8 times as many rotation steps. Every regime gets blocks
// of all four sizes and all angles, checked coefficient by coefficient through
// sdct_unit_run, plus the steering latency S + 5 of its first 32x32 block
// (S = 64, 128, 256 steps). At these clock ratios the steering part keeps up
// with the DCT, so no FIFO stall is required.
module tb_sdct_regimes;
  logic clk = 0, clk2 = 0, clk4 = 0, clk8 = 0, rst_n = 0;
  logic fin2, fin4, fin8;
  int   c2, f2, c4, f4, c8, f8;

  sdct_unit_run #(.N_MAX(32), .LANES(8), .NB(10), .EXPECT_STALL(1'b0)) u2x (
    .clk, .clk_st(clk2), .rst_n, .finished(fin2), .checks(c2), .failures(f2));
  sdct_unit_run #(.N_MAX(32), .LANES(4), .NB(10), .EXPECT_STALL(1'b0)) u4x (
    .clk, .clk_st(clk4), .rst_n, .finished(fin4), .checks(c4), .failures(f4));
  sdct_unit_run #(.N_MAX(32), .LANES(2), .NB(10), .EXPECT_STALL(1'b0)) u8x (
    .clk, .clk_st(clk8), .rst_n, .finished(fin8), .checks(c8), .failures(f8));

  always #40 clk  = ~clk;
  always #20 clk2 = ~clk2;
  always #10 clk4 = ~clk4;
  always #5  clk8 = ~clk8;

  initial begin
    #2000000;
    $display("timeout");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c8, f2 + f4 + f8 + 1);
    $finish;
  end

  initial begin
    #200;
    @(negedge clk) rst_n = 1;
    wait (fin2 && fin4 && fin8);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c8, f2 + f4 + f8);
    $finish;
  end
endmodule
