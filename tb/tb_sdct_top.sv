// tb_sdct_top: end-to-end test of the SDCT accelerator at its default size
// (N_MAX = 32), with the DCT on clk and the steering part on a separate clk_st.
// A stream of residual blocks of every size (4, 8, 16, 32) and every angle 0..7
// is pushed in; each output block is compared with the reference SDCT: the
// HEVC 2D DCT of the block, then each pair (r,c)/(c,r), r > c, rotated by the
// integer lifting model, diagonal untouched. Three clock regimes are run:
// clk_st faster than clk (the intended one), clk_st much slower (the FIFO fills
// and the DCT column pass stalls), and equal periods with a phase offset.
// Counted mechanisms, each of which must occur: every block size, plain DCT
// (angle 0, bypass), rotated blocks, DCT stalls on a full FIFO, steering idle
// on an empty FIFO, input held off during the DCT column pass. Also checks the
// 2N-cycle DCT block time and the steering latency (N+5 clk_st cycles from the
// last IM write to the first output column, i.e. 2N+4 from the first write when
// columns arrive back to back).
module tb_sdct_top;
  import sdct_pkg::*;
  import sdct_tb_pkg::*;

  logic clk = 0, clk_st = 0, rst_n = 0;
  logic start = 0, data_in_valid = 0;
  size_t sel_dct_in = 0, sel_dct_out;
  angle_t z_in = 0, z_out;
  logic signed [8:0]  data_in [32];
  logic signed [15:0] data_out [32];
  logic data_in_ready, data_out_valid, done;
  int checks = 0, failures = 0;
  real half = 5.0, half_st = 3.0;

  sdct_top dut (.clk, .clk_st, .rst_n, .start, .sel_dct_in, .z_in, .data_in_valid, .data_in,
                .data_in_ready, .data_out_valid, .data_out, .done, .sel_dct_out, .z_out);

  always #(half) clk = ~clk;
  always #(half_st) clk_st = ~clk_st;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%s", msg);
    end
  endtask

  localparam int NB = 36;
  blk_t in_blk [NB];
  blk_t exp_blk [NB];
  int sizes [NB], angs [NB];
  int ob = 0, oc = 0;
  int n_size [4], n_bypass = 0, n_rot = 0, n_stall = 0, n_empty = 0, n_holdoff = 0;
  int dct_time_bad = 0, lat = -1;

  initial begin
    #5000000;
    failures++;
    $display("timeout: %0d blocks out", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference blocks
  initial begin
    blk_t dct;
    int y1, y2, n;
    for (int b = 0; b < NB; b++) begin
      sizes[b] = (b < 4) ? 3 : (b * 7 + b / 8) % 4;
      angs[b]  = (b * 3) % 8;
      n = 4 << sizes[b];
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++)
          in_blk[b][r][c] = (r < n && c < n) ?
                            ((b == 5) ? 255 : (b == 6) ? -255 : int'($urandom_range(0, 510)) - 255) : 0;
      ref_dct2d(n, in_blk[b], dct);
      exp_blk[b] = dct;
      if (angs[b] != 0)
        for (int r = 0; r < n; r++)
          for (int c = 0; c < r; c++) begin
            ref_rot(dct[r][c], dct[c][r], angs[b], y1, y2);
            exp_blk[b][r][c] = y1;
            exp_blk[b][c][r] = y2;
          end
    end
  end

  // producer on clk
  initial begin
    int n, t0;
    for (int i = 0; i < 32; i++) data_in[i] = '0;
    #40;
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      if (b == 12) begin half_st = 20.0; end             // slow steering clock
      if (b == 20) begin half_st = 5.0; #3; end          // equal periods, offset
      if (b == 28) begin half_st = 2.5; end              // fast steering clock again
      n = 4 << sizes[b];
      while (!data_in_ready) @(negedge clk);
      start = 1; sel_dct_in = size_t'(sizes[b]); z_in = angle_t'(angs[b]);
      @(negedge clk);
      start = 0;
      t0 = 0;
      for (int r = 0; r < n; r++) begin
        data_in_valid = 1;
        for (int c = 0; c < 32; c++) data_in[c] = 9'(in_blk[b][r][c]);
        @(negedge clk);
        t0++;
      end
      data_in_valid = 0;
      // the column pass follows immediately; without a full FIFO it takes N cycles
      while (dut.col_phase) begin
        if (dut.fifo_full) n_stall++;
        if (!data_in_ready) n_holdoff++;
        @(negedge clk);
        t0++;
      end
      if (b < 12 && t0 != 2 * n) dct_time_bad++;
    end
  end

  // steering-side monitors on clk_st
  // Here the IM is filled at the DCT's column rate, so the latency is measured
  // from the last column written into the IM: N reordering cycles plus the
  // 4-cycle pipeline plus the OM output register, N + 5 clk_st cycles.
  int t_in = 0, t_last_w = -1;
  always @(negedge clk_st) if (rst_n) begin
    t_in++;
    if (dut.col_ready && dut.fifo_empty) n_empty++;
    if (dut.w_r_n1 && dut.done_2 && ob == 0 && t_last_w < 0) t_last_w = t_in;
    if (data_out_valid) begin
      if (ob == 0 && oc == 0 && t_last_w >= 0) lat = t_in - t_last_w;
      check(sel_dct_out == size_t'(sizes[ob]) && z_out == angle_t'(angs[ob]), "output tags");
      check(done == (oc == (4 << sizes[ob]) - 1), "done");
      for (int u = 0; u < 32; u++)
        check(int'(data_out[u]) == exp_blk[ob][u][oc],
              $sformatf("block %0d (N=%0d, angle %0d) coef (%0d,%0d): got %0d expected %0d",
                        ob, 4 << sizes[ob], angs[ob], u, oc, data_out[u], exp_blk[ob][u][oc]));
      if (oc == (4 << sizes[ob]) - 1) begin
        n_size[sizes[ob]]++;
        if (angs[ob] == 0) n_bypass++; else n_rot++;
        oc = 0; ob++;
      end else oc++;
    end
  end

  initial begin
    wait (ob == NB);
    #100;
    for (int s = 0; s < 4; s++) check(n_size[s] > 0, $sformatf("no block of size %0d", 4 << s));
    check(n_bypass > 0, "no angle-0 (bypass) block");
    check(n_rot > 0, "no rotated block");
    check(n_stall > 0, "the DCT never stalled on a full FIFO");
    check(n_empty > 0, "the steering part never waited on an empty FIFO");
    check(n_holdoff > 0, "input never held off");
    check(dct_time_bad == 0, "a DCT block did not take 2N cycles");
    check(lat == (4 << sizes[0]) + 5, $sformatf("steering latency %0d, expected %0d", lat, (4 << sizes[0]) + 5));
    $display("blocks=%0d sizes 4/8/16/32: %0d/%0d/%0d/%0d bypass=%0d rotated=%0d stall_cycles=%0d empty_cycles=%0d holdoff=%0d latency=%0d",
             ob, n_size[0], n_size[1], n_size[2], n_size[3], n_bypass, n_rot, n_stall, n_empty, n_holdoff, lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
