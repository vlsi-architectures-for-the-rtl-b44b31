// tb_sdct_dct2d: runs the folded 2D-DCT datapath through N row cycles and N
// column cycles (the sequence CU-1 produces) for random residual blocks of
// every size, and compares each output column with the HEVC reference
// transform. Residuals are 9-bit ([-255, 255]); some blocks are all +255 or
// all -255 to reach the extremes of the DC coefficient.
module tb_sdct_dct2d;
  import sdct_tb_pkg::*;
  logic clk = 0;
  logic [1:0] sel;
  logic row_we = 0, col_phase = 0;
  logic [4:0] row_idx = 0, col_idx = 0;
  logic signed [8:0]  data_in [32];
  logic signed [15:0] out_col [32];
  int checks = 0, failures = 0;

  sdct_dct2d #(.N_MAX(32)) dut (.clk, .sel, .row_we, .row_idx, .col_phase, .col_idx,
                                .data_in, .out_col);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t xb, yb;
    int n_pts;
    for (int i = 0; i < 32; i++) data_in[i] = '0;
    for (int t = 0; t < 24; t++) begin
      sel = 2'(t % 4);
      n_pts = 4 << sel;
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++)
          xb[r][c] = (r >= n_pts || c >= n_pts) ? 0 :
                     (t / 4 == 1) ? 255 : (t / 4 == 2) ? -255 :
                     int'($urandom_range(0, 510)) - 255;
      ref_dct2d(n_pts, xb, yb);
      for (int r = 0; r < n_pts; r++) begin
        @(negedge clk);
        row_we = 1; row_idx = 5'(r);
        for (int c = 0; c < 32; c++) data_in[c] = 9'(xb[r][c]);
      end
      @(negedge clk);
      row_we = 0;
      col_phase = 1;
      for (int v = 0; v < n_pts; v++) begin
        col_idx = 5'(v);
        #1;
        for (int u = 0; u < 32; u++) begin
          checks++;
          if (int'(out_col[u]) != ((u < n_pts) ? yb[u][v] : 0)) begin
            failures++;
            if (failures < 10)
              $display("N=%0d Y[%0d][%0d]: got %0d expected %0d", n_pts, u, v, out_col[u], yb[u][v]);
          end
        end
        @(negedge clk);
      end
      col_phase = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
