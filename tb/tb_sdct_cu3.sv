// tb_sdct_cu3: feeds CU-3 blocks of columns as fast as it accepts them (sizes
// 4..32, angles 0..7) and checks the control sequence cycle by cycle:
// IM writes at columns 0..N-1 with im_start on the first; add_r1 = 0..N-1 right
// after the last column; OM writes of step s three cycles after its read, with
// mux_sel on the last (diagonal) step or for angle 0; OM reads 0..N-1 right after
// the last write, rd_last on the last. The first OM read of the first block is
// issued 2N+3 cycles after its first column, so the OM output register shows
// it after 2N+4 cycles (the specified latency). A second block loads while
// the first is read out, and its rotation waits until the OM is free.
module tb_sdct_cu3;
  import sdct_pkg::*;
  logic clk = 0, rst_n = 0;
  logic col_valid = 0, col_last = 0;
  size_t col_size = 0;
  angle_t col_angle = 0;
  logic col_ready, im_start, w_r_n1, mux_sel, w_r_n2, rd_en, rd_last;
  logic [4:0] add_w1, add_r1, add_w2, add_r2;
  int checks = 0, failures = 0;
  int cyc = 0;

  sdct_cu3 #(.N_MAX(32)) dut (.clk, .rst_n, .col_valid, .col_last, .col_size, .col_angle,
                              .col_ready, .im_start, .w_r_n1, .add_w1, .add_r1, .mux_sel,
                              .w_r_n2, .add_w2, .rd_en, .rd_last, .add_r2);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("cycle %0d: %s", cyc, msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("timeout: loaded %0d, rotated %0d, read %0d blocks", lb, wb, ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // block sequence
  localparam int NB = 10;
  int sizes [NB] = '{3, 3, 0, 1, 2, 3, 0, 2, 1, 3};
  int angs  [NB] = '{5, 0, 1, 2, 3, 4, 0, 6, 7, 3};

  // producer: offers columns whenever CU-3 is ready. Inputs change at the
  // falling edge; the monitor samples 1 time unit later what the next rising
  // edge will act on.
  int pb = 0, pc = 0;
  int lb = 0, lc = 0, wb = 0, ws = 0, ob = 0, oc = 0;
  int first_load [NB], first_rd [NB], last_wr [NB], rd_done [NB];
  int n;
  always @(negedge clk) if (rst_n) begin
    if (pb < NB) begin
      col_valid = 1; col_size = size_t'(sizes[pb]); col_angle = angle_t'(angs[pb]);
      col_last = (pc == (4 << sizes[pb]) - 1);
    end else begin
      col_valid = 0; col_last = 0;
    end
    #1;
    cyc++;
    if (w_r_n1) begin
      check(col_valid && col_ready && add_w1 == 5'(lc) && im_start == (lc == 0), "IM write sequence");
      if (lc == 0) first_load[lb] = cyc;
      if (lc == (4 << sizes[lb]) - 1) begin lc = 0; lb++; end else lc++;
      if (pc == (4 << sizes[pb]) - 1) begin pc = 0; pb++; end else pc++;
    end
    if (w_r_n2) begin
      n = 4 << sizes[wb];
      check(add_w2 == 5'(ws), "OM write order");
      check(mux_sel == (angs[wb] == 0 || ws == n - 1), "mux_sel");
      check(!rd_en, "OM written while read");
      if (ws == 0 && wb > 0) check(cyc > rd_done[wb-1], "rotation before OM free");
      if (ws == n - 1) begin last_wr[wb] = cyc; ws = 0; wb++; end else ws++;
    end
    if (rd_en) begin
      n = 4 << sizes[ob];
      check(add_r2 == 5'(oc) && rd_last == (oc == n - 1), "OM read sequence");
      if (oc == 0) begin
        first_rd[ob] = cyc;
        check(cyc == last_wr[ob] + 1, "OM read not right after last write");
      end
      if (oc == n - 1) begin rd_done[ob] = cyc; oc = 0; ob++; end else oc++;
    end
  end

  initial begin
    int n0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // first block: check the read address sequence directly
    n0 = 4 << sizes[0];
    wait (w_r_n1);
    @(posedge clk);
    repeat (n0 - 1) @(posedge clk);
    for (int s = 0; s < n0; s++) begin
      @(negedge clk); #2;
      check(add_r1 == 5'(s) && !col_ready, $sformatf("add_r1 step %0d", s));
    end
    @(negedge clk); #2;
    check(col_ready, "IM not free after rotation");
    wait (ob == NB);
    @(negedge clk);
    check(first_rd[0] - first_load[0] + 1 == 2 * n0 + 4,
          $sformatf("latency %0d, expected %0d", first_rd[0] - first_load[0] + 1, 2 * n0 + 4));
    for (int b = 1; b < NB; b++)
      check(first_load[b] > first_load[b-1], "block order");
    $display("blocks=%0d first-block latency=%0d", ob, first_rd[0] - first_load[0] + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
