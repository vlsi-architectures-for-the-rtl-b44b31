// tb_sdct_cu2: presents CU-2 a FIFO that holds blocks of every size, with
// random empty cycles and random back-pressure from CU-3, and checks that a
// word is popped exactly when it is valid and accepted, that done_2 comes with
// the transfer of each block's last column, and the column and block counts.
module tb_sdct_cu2;
  import sdct_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fifo_empty = 1, fifo_last = 0, col_ready = 0;
  size_t fifo_size = 0;
  logic fifo_rd_en, col_valid, done_2;
  logic [4:0] col_cnt;
  logic [15:0] blocks;
  int checks = 0, failures = 0;

  sdct_cu2 #(.N_MAX(32)) dut (.clk, .rst_n, .fifo_empty, .fifo_last, .fifo_size, .fifo_rd_en,
                              .col_ready, .col_valid, .done_2, .col_cnt, .blocks);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b = 0, c = 0, n, dones = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (b < 20) begin
      n = 4 << (b % 4);
      fifo_empty = ($urandom_range(0, 3) == 0);
      col_ready  = ($urandom_range(0, 3) != 0);
      fifo_size  = size_t'(b % 4);
      fifo_last  = (c == n - 1);
      #1;
      check(col_valid == !fifo_empty && fifo_rd_en == (!fifo_empty && col_ready), "pop handshake");
      check(done_2 == (fifo_rd_en && c == n - 1), "done_2");
      check(int'(col_cnt) == c && int'(blocks) == b, "counters");
      if (fifo_rd_en) begin
        if (done_2) dones++;
        if (c == n - 1) begin c = 0; b++; end else c++;
      end
      @(negedge clk);
    end
    check(dones == 20 && blocks == 16'd20, "block count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
