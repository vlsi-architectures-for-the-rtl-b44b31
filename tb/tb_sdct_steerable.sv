// tb_sdct_steerable: the steering part on its own, driven by its controller
// CU-3. Blocks of random coefficients (all sizes, all 8 angles) are fed one
// column per cycle whenever the IM accepts them; every output column is compared
// with the reference: for r > c the pair (Y[r][c], Y[c][r]) rotated by the block's
// angle through the integer lifting model, diagonal elements unchanged, angle 0
// a plain copy. Also checks the output tags, 'done' on the last column, and the
// latency of 2N+4 cycles from the first input column to the first output column.
module tb_sdct_steerable;
  import sdct_pkg::*;
  import sdct_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic col_valid = 0, col_last = 0;
  size_t col_size = 0;
  angle_t col_angle = 0;
  logic signed [15:0] d_in [32];
  logic col_ready, im_start, w_r_n1, mux_sel, w_r_n2, rd_en, rd_last;
  logic [4:0] add_w1, add_r1, add_w2, add_r2;
  logic signed [15:0] d_out [32];
  logic data_out_valid, done;
  angle_t angle_out;
  size_t sel_dct_out;
  int checks = 0, failures = 0;

  sdct_cu3 #(.N_MAX(32)) u_cu3 (.clk, .rst_n, .col_valid, .col_last, .col_size, .col_angle,
                                .col_ready, .im_start, .w_r_n1, .add_w1, .add_r1, .mux_sel,
                                .w_r_n2, .add_w2, .rd_en, .rd_last, .add_r2);
  sdct_steerable #(.N_MAX(32)) dut (.clk, .rst_n, .start(im_start), .d_in, .angle(col_angle),
                                    .sel_dct(col_size), .w_r_n1, .add_w1, .add_r1, .mux_sel,
                                    .w_r_n2, .add_w2, .rd_en, .rd_last, .add_r2, .d_out,
                                    .data_out_valid, .done, .angle_out, .sel_dct_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%s", msg);
    end
  endtask

  localparam int NB = 16;
  blk_t in_blk [NB];
  blk_t exp_blk [NB];
  int sizes [NB], angs [NB];
  int pb = 0, pc = 0, ob = 0, oc = 0, cyc = 0, t_in0 = -1, t_out0 = -1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("timeout: %0d blocks in, %0d out", pb, ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus and expected blocks
  initial begin
    int y1, y2, n;
    for (int b = 0; b < NB; b++) begin
      sizes[b] = (b < 8) ? 3 : b % 4;
      angs[b]  = b % 8;
      n = 4 << sizes[b];
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++) begin
          in_blk[b][r][c]  = (r < n && c < n) ? int'($urandom_range(0, 40000)) - 20000 : 0;
          exp_blk[b][r][c] = in_blk[b][r][c];
        end
      if (angs[b] != 0)
        for (int r = 0; r < n; r++)
          for (int c = 0; c < r; c++) begin
            ref_rot(in_blk[b][r][c], in_blk[b][c][r], angs[b], y1, y2);
            exp_blk[b][r][c] = y1;
            exp_blk[b][c][r] = y2;
          end
    end
  end

  // producer (inputs change at the falling edge) and output checker
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (pb < NB) begin
      col_valid = 1; col_size = size_t'(sizes[pb]); col_angle = angle_t'(angs[pb]);
      col_last  = (pc == (4 << sizes[pb]) - 1);
      for (int u = 0; u < 32; u++) d_in[u] = 16'(in_blk[pb][u][pc]);
    end else begin
      col_valid = 0; col_last = 0;
    end
    #1;
    if (col_valid && col_ready) begin
      if (pb == 0 && pc == 0) t_in0 = cyc;
      if (col_last) begin pc = 0; pb++; end else pc++;
    end
    if (data_out_valid) begin
      if (ob == 0 && oc == 0) t_out0 = cyc;
      check(sel_dct_out == size_t'(sizes[ob]) && angle_out == angle_t'(angs[ob]), "output tags");
      check(done == (oc == (4 << sizes[ob]) - 1), "done");
      for (int u = 0; u < 32; u++)
        check(int'(d_out[u]) == exp_blk[ob][u][oc],
              $sformatf("block %0d (N=%0d, angle %0d) coef (%0d,%0d): got %0d expected %0d",
                        ob, 4 << sizes[ob], angs[ob], u, oc, d_out[u], exp_blk[ob][u][oc]));
      if (oc == (4 << sizes[ob]) - 1) begin oc = 0; ob++; end else oc++;
    end
  end

  initial begin
    for (int u = 0; u < 32; u++) d_in[u] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (ob == NB);
    @(negedge clk);
    check(t_out0 - t_in0 == 2 * 32 + 4,
          $sformatf("latency %0d cycles, expected %0d", t_out0 - t_in0, 2 * 32 + 4));
    $display("blocks=%0d latency=%0d", ob, t_out0 - t_in0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
