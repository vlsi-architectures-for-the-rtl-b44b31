// tb_sdct_dct1d: checks the reconfigurable 1D DCT for every size (4..32) on
// random inputs against a direct matrix product with the reference HEVC matrix,
// and that the outputs beyond the selected size are zero.
module tb_sdct_dct1d;
  import sdct_tb_pkg::*;
  logic [1:0] sel;
  logic signed [31:0] x [32];
  logic signed [31:0] y [32];
  int checks = 0, failures = 0;

  sdct_dct1d #(.N(32), .W(32)) dut (.sel, .x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_pts;
    longint acc;
    for (int t = 0; t < 80; t++) begin
      sel = 2'(t % 4);
      n_pts = 4 << sel;
      for (int i = 0; i < 32; i++)
        x[i] = (t < 4) ? ((i == t) ? 32'sd1 : 32'sd0)
                       : 32'(int'($urandom_range(0, 65535)) - 32768);
      #1;
      for (int k = 0; k < 32; k++) begin
        acc = 0;
        if (k < n_pts)
          for (int n = 0; n < n_pts; n++) acc += longint'(ref_coef(n_pts, k, n)) * x[n];
        checks++;
        if (longint'(y[k]) != acc) begin
          failures++;
          if (failures < 10) $display("N=%0d k=%0d: got %0d expected %0d", n_pts, k, y[k], acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
