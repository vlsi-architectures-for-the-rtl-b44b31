// tb_sdct_cu1: checks the DCT controller's sequencing for every size: start
// latches size/angle, N rows with gaps in data_in_valid are written with row
// indices 0..N-1, then N columns are presented with col_idx 0..N-1, holding
// while out_ready is low; done_1 comes with the last column, and with no gaps
// and no back-pressure a block takes exactly 2N cycles after start.
module tb_sdct_cu1;
  import sdct_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, data_in_valid = 0, out_ready = 1;
  size_t sel_dct_in = 0, size_q;
  angle_t z_in = 0, angle_q;
  logic data_in_ready, out_valid, row_we, col_phase, done_1;
  logic [4:0] row_idx, col_idx;
  int checks = 0, failures = 0;

  sdct_cu1 #(.N_MAX(32)) dut (.clk, .rst_n, .start, .sel_dct_in, .z_in, .data_in_valid,
                              .data_in_ready, .out_ready, .out_valid, .row_we, .row_idx,
                              .col_phase, .col_idx, .size_q, .angle_q, .done_1);

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
    int n, rows, cols, cycles, stalls;
    bit gaps;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      n = 4 << (t % 4);
      gaps = (t >= 8);
      @(negedge clk);
      check(data_in_ready && !col_phase, "not idle");
      start = 1; sel_dct_in = size_t'(t % 4); z_in = angle_t'(t % 8);
      @(negedge clk);
      start = 0; sel_dct_in = 0; z_in = 0;
      check(size_q == size_t'(t % 4) && angle_q == angle_t'(t % 8), "tags not latched");
      rows = 0; cols = 0; cycles = 1; stalls = 0;
      while (cols < n) begin
        data_in_valid = rows < n && (!gaps || $urandom_range(0, 2) != 0);
        out_ready     = !gaps || $urandom_range(0, 3) != 0;
        #1;
        if (rows < n) begin
          check(data_in_ready && !col_phase && row_we == data_in_valid &&
                (!row_we || row_idx == 5'(rows)), $sformatf("row phase N=%0d row %0d", n, rows));
          if (data_in_valid) rows++;
        end else begin
          check(col_phase && out_valid && !data_in_ready && col_idx == 5'(cols) &&
                done_1 == (out_ready && cols == n - 1), $sformatf("column phase N=%0d col %0d", n, cols));
          if (out_ready) cols++; else stalls++;
        end
        @(negedge clk);
        cycles++;
      end
      data_in_valid = 0; out_ready = 1;
      if (!gaps) check(cycles == 2 * n + 1, $sformatf("N=%0d took %0d cycles, expected %0d", n, cycles - 1, 2 * n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
