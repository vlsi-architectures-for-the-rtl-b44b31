// tb_sdct_om: writes N zig-zag steps of tagged pairs into the output memory
// (lane l of step s carries y1 = 2*slot, y2 = 2*slot+1, slot = s*N/2 + l), reads
// the block back column by column and checks the scatter: every position is
// written once, (r,c) with r > c holds y1 and (c,r) the y2 of the same slot,
// slots follow the anti-diagonals, the last N/2 slots land on the diagonal,
// rows >= N read as zero, and data_out_valid / done / tags follow rd_en and
// rd_last by one cycle.
module tb_sdct_om;
  import sdct_pkg::*;
  logic clk = 0, rst_n = 0;
  logic w_r_n2 = 0, rd_en = 0, rd_last = 0;
  logic [4:0] add_w2 = 0, add_r2 = 0;
  angle_t angle_in = 0, angle_out;
  size_t  sel_in = 0, sel_dct_out;
  logic signed [15:0] y1 [16], y2 [16];
  logic signed [15:0] d_out [32];
  logic data_out_valid, done;
  int checks = 0, failures = 0;

  sdct_om #(.N_MAX(32)) dut (.clk, .rst_n, .w_r_n2, .add_w2, .angle_in, .sel_in, .y1, .y2,
                             .rd_en, .rd_last, .add_r2, .d_out, .data_out_valid, .done,
                             .angle_out, .sel_dct_out);

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
    int n_pts, h, v1, v2, s1, s2, prev_d;
    int blk [32][32];
    int slot_d [512];
    for (int l = 0; l < 16; l++) begin y1[l] = 0; y2[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      n_pts = 4 << (t % 4);
      h = n_pts / 2;
      for (int s = 0; s < n_pts; s++) begin
        @(negedge clk);
        w_r_n2 = 1; add_w2 = 5'(s);
        angle_in = (s == 0) ? angle_t'(7 - t) : 3'd0;
        sel_in   = (s == 0) ? size_t'(t % 4) : 2'd0;
        for (int l = 0; l < 16; l++) begin
          y1[l] = 16'(2 * (s * h + l));
          y2[l] = 16'(2 * (s * h + l) + 1);
        end
      end
      @(negedge clk);
      w_r_n2 = 0;
      for (int v = 0; v < n_pts; v++) begin
        rd_en = 1; add_r2 = 5'(v); rd_last = (v == n_pts - 1);
        @(negedge clk);
        check(data_out_valid && (done == (v == n_pts - 1)), "valid/done timing");
        check(angle_out == angle_t'(7 - t) && sel_dct_out == size_t'(t % 4), "tags");
        for (int u = 0; u < 32; u++) begin
          blk[u][v] = int'(d_out[u]);
          if (u >= n_pts) check(d_out[u] == 0, "row beyond N not zero");
        end
      end
      rd_en = 0; rd_last = 0;
      @(negedge clk);
      check(!data_out_valid && !done, "valid after reads");
      for (int i = 0; i < 512; i++) slot_d[i] = -1;
      for (int r = 0; r < n_pts; r++)
        for (int c = 0; c < r; c++) begin
          v1 = blk[r][c]; v2 = blk[c][r];
          s1 = v1 / 2;
          check(v1 % 2 == 0 && v2 == v1 + 1 && s1 < n_pts * (n_pts - 1) / 2 && slot_d[s1] == -1,
                $sformatf("N=%0d: (%0d,%0d)=%0d (%0d,%0d)=%0d", n_pts, r, c, v1, c, r, v2));
          if (s1 >= 0 && s1 < 512) slot_d[s1] = r + c;
        end
      prev_d = 0;
      for (int i = 0; i < n_pts * (n_pts - 1) / 2; i++) begin
        check(slot_d[i] >= prev_d, $sformatf("N=%0d: slot %0d breaks the anti-diagonal order", n_pts, i));
        prev_d = slot_d[i];
      end
      for (int j = 0; j < h; j++) begin
        s2 = n_pts * (n_pts - 1) / 2 + j;
        check(blk[2*j][2*j] == 2 * s2 && blk[2*j+1][2*j+1] == 2 * s2 + 1,
              $sformatf("N=%0d: diagonal %0d wrong", n_pts, j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
