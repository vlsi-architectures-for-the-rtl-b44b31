// tb_sdct_reduced: runs the two reduced SDCT units, SDCT-16 (N_MAX = 16, sizes
// 4..16, 8 rotators) and SDCT-8 (N_MAX = 8, sizes 4 and 8, 4 rotators), each
// on a single clock (clk_st tied to clk), through sdct_unit_run, and reports
// their combined checks. With one clock a block needs 2N+3 steering cycles
// against 2N DCT cycles, so the FIFO must fill and stall the DCT.
module tb_sdct_reduced;
  logic clk = 0, rst_n = 0;
  logic fin16, fin8;
  int   c16, f16, c8, f8;

  sdct_unit_run #(.N_MAX(16), .NB(24)) u16 (.clk, .clk_st(clk), .rst_n, .finished(fin16), .checks(c16), .failures(f16));
  sdct_unit_run #(.N_MAX(8),  .NB(24)) u8  (.clk, .clk_st(clk), .rst_n, .finished(fin8),  .checks(c8),  .failures(f8));

  always #5 clk = ~clk;

  initial begin
    #400000;
    $display("timeout");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8 + 1);
    $finish;
  end

  initial begin
    #40;
    @(negedge clk) rst_n = 1;
    wait (fin16 && fin8);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, f16 + f8);
    $finish;
  end
endmodule
