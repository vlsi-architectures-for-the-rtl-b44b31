// sdct_unit_run: test driver for one SDCT unit built from sdct_top with a given
// N_MAX (largest size) and LANES (lifting rotators in the steering unit). The
// DCT runs on clk and the steering unit on clk_st; the two may be the same net.
// It pushes NB random residual blocks of every size the unit supports and every
// angle, compares each output column with the reference SDCT (HEVC 2D DCT
// followed by integer lifting rotations), checks the steering latency of the
// first block and raises 'finished' with its check and failure counts.
// Mechanisms that must occur: every size, angle 0 (bypass), rotation, and - if
// EXPECT_STALL is set - a DCT stall on a full FIFO.
// Latency: the first block has the largest size N; from the clk_st edge that
// writes its last column into the IM to its first output column there are
// S + 5 clk_st cycles, S = N*N / (2 * min(LANES, N/2)) rotation steps plus the
// 4-cycle pipeline and the OM output register.
module sdct_unit_run
  import sdct_pkg::*;
  import sdct_tb_pkg::*;
#(
  parameter int N_MAX        = 16,
  parameter int LANES        = N_MAX / 2,
  parameter int NB           = 24,
  parameter bit EXPECT_STALL = 1'b1
) (
  input  logic clk,
  input  logic clk_st,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int NS = $clog2(N_MAX) - 1;   // number of supported sizes

  logic start = 0, data_in_valid = 0;
  size_t sel_dct_in = 0, sel_dct_out;
  angle_t z_in = 0, z_out;
  logic signed [8:0]  data_in [N_MAX];
  logic signed [15:0] data_out [N_MAX];
  logic data_in_ready, data_out_valid, done;

  sdct_top #(.N_MAX(N_MAX), .FIFO_DEPTH(N_MAX), .LANES(LANES)) dut (
    .clk, .clk_st, .rst_n, .start, .sel_dct_in, .z_in, .data_in_valid, .data_in,
    .data_in_ready, .data_out_valid, .data_out, .done, .sel_dct_out, .z_out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("N_MAX=%0d LANES=%0d: %s", N_MAX, LANES, msg);
    end
  endtask

  blk_t in_blk [NB];
  blk_t exp_blk [NB];
  int sizes [NB], angs [NB];
  int ob = 0, oc = 0;
  int n_size [4], n_bypass = 0, n_rot = 0, n_stall = 0;
  int t_st = 0, t_last_w = -1, lat = -1, lat_exp;

  initial begin
    blk_t dct;
    int y1, y2, n;
    finished = 0; checks = 0; failures = 0;
    for (int s = 0; s < 4; s++) n_size[s] = 0;
    for (int b = 0; b < NB; b++) begin
      sizes[b] = (b < 3) ? NS - 1 : (b * 5) % NS;
      angs[b]  = (b * 3) % 8;
      n = 4 << sizes[b];
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++)
          in_blk[b][r][c] = (r < n && c < n) ? int'($urandom_range(0, 510)) - 255 : 0;
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
    n = 4 << sizes[0];
    lat_exp = n * n / (2 * ((LANES < n / 2) ? LANES : n / 2)) + 5;
  end

  // producer
  initial begin
    int n;
    for (int i = 0; i < N_MAX; i++) data_in[i] = '0;
    wait (rst_n);
    @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      n = 4 << sizes[b];
      while (!data_in_ready) begin
        if (dut.col_phase && dut.fifo_full) n_stall++;
        @(negedge clk);
      end
      start = 1; sel_dct_in = size_t'(sizes[b]); z_in = angle_t'(angs[b]);
      @(negedge clk);
      start = 0;
      for (int r = 0; r < n; r++) begin
        data_in_valid = 1;
        for (int c = 0; c < N_MAX; c++) data_in[c] = 9'(in_blk[b][r][c]);
        @(negedge clk);
      end
      data_in_valid = 0;
    end
  end

  // checker, on the steering clock
  always @(negedge clk_st) if (rst_n && !finished) begin
    t_st++;
    if (dut.w_r_n1 && dut.done_2 && ob == 0 && t_last_w < 0) t_last_w = t_st;
    if (data_out_valid) begin
      if (ob == 0 && oc == 0) lat = t_st - t_last_w;
      check(sel_dct_out == size_t'(sizes[ob]) && z_out == angle_t'(angs[ob]), "output tags");
      check(done == (oc == (4 << sizes[ob]) - 1), "done");
      for (int u = 0; u < N_MAX; u++)
        check(int'(data_out[u]) == exp_blk[ob][u][oc],
              $sformatf("block %0d (N=%0d, angle %0d) coef (%0d,%0d): got %0d expected %0d",
                        ob, 4 << sizes[ob], angs[ob], u, oc, data_out[u], exp_blk[ob][u][oc]));
      if (oc == (4 << sizes[ob]) - 1) begin
        n_size[sizes[ob]]++;
        if (angs[ob] == 0) n_bypass++; else n_rot++;
        oc = 0; ob++;
      end else oc++;
      if (ob == NB) begin
        for (int s = 0; s < NS; s++) check(n_size[s] > 0, $sformatf("no block of size %0d", 4 << s));
        check(n_bypass > 0, "no angle-0 block");
        check(n_rot > 0, "no rotated block");
        if (EXPECT_STALL) check(n_stall > 0, "the DCT never stalled on a full FIFO");
        check(lat == lat_exp, $sformatf("steering latency %0d, expected %0d", lat, lat_exp));
        $display("N_MAX=%0d LANES=%0d: blocks=%0d bypass=%0d rotated=%0d stall_cycles=%0d latency=%0d",
                 N_MAX, LANES, ob, n_bypass, n_rot, n_stall, lat);
        finished = 1;
      end
    end
  end
endmodule
