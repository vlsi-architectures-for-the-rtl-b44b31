// tb_sdct_im: writes blocks whose entries encode their own position
// (value = 64*row + column) into the input memory, column by column, then reads
// the N zig-zag steps and checks the reordering: every off-diagonal pair
// (r,c)/(c,r), r > c, comes out exactly once with x1 = (r,c) and x2 = (c,r);
// pairs come anti-diagonal by anti-diagonal (r+c never decreases), running
// down on odd anti-diagonals and up on even ones; the last step carries the
// diagonal elements two by two; reads appear one cycle after the address.
// Also checks that the angle and size code are latched at 'start'.
module tb_sdct_im;
  import sdct_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, w_r_n1 = 0;
  angle_t angle = 0;
  size_t sel_dct = 0;
  logic signed [15:0] d_in [32];
  logic [4:0] add_w1 = 0, add_r1 = 0;
  logic signed [15:0] x1 [16], x2 [16];
  angle_t angle_q;
  size_t  sel_q;
  int checks = 0, failures = 0;

  sdct_im #(.N_MAX(32)) dut (.clk, .rst_n, .start, .angle, .sel_dct, .d_in, .w_r_n1,
                             .add_w1, .add_r1, .x1, .x2, .angle_q, .sel_q);

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
    int n_pts, r, c, r2, c2, prev_d, prev_r, d;
    bit seen [32][32];
    for (int i = 0; i < 32; i++) d_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      n_pts = 4 << (t % 4);
      for (int a = 0; a < 32; a++) for (int b = 0; b < 32; b++) seen[a][b] = 0;
      for (int v = 0; v < n_pts; v++) begin
        @(negedge clk);
        w_r_n1 = 1; add_w1 = 5'(v); start = (v == 0);
        angle = angle_t'(t); sel_dct = size_t'(t % 4);
        for (int u = 0; u < 32; u++) d_in[u] = 16'(64 * u + v);
      end
      @(negedge clk);
      w_r_n1 = 0; start = 0; angle = 0; sel_dct = 0;
      check(angle_q == angle_t'(t) && sel_q == size_t'(t % 4), "tags not latched");
      prev_d = 0; prev_r = 0;
      for (int s = 0; s < n_pts; s++) begin
        add_r1 = 5'(s);
        @(negedge clk);
        for (int l = 0; l < n_pts / 2; l++) begin
          r = int'(x1[l]) / 64; c = int'(x1[l]) % 64;
          r2 = int'(x2[l]) / 64; c2 = int'(x2[l]) % 64;
          if (s < n_pts - 1) begin
            d = r + c;
            check(r > c && r < n_pts && r2 == c && c2 == r && !seen[r][c],
                  $sformatf("N=%0d step %0d lane %0d: bad pair (%0d,%0d)/(%0d,%0d)", n_pts, s, l, r, c, r2, c2));
            check(d > prev_d || (d == prev_d && ((d % 2 == 1) ? r > prev_r : r < prev_r)),
                  $sformatf("N=%0d step %0d lane %0d: (%0d,%0d) out of zig-zag order", n_pts, s, l, r, c));
            seen[r][c] = 1;
            prev_d = d; prev_r = r;
          end else begin
            check(r == 2 * l && c == 2 * l && r2 == 2 * l + 1 && c2 == 2 * l + 1,
                  $sformatf("N=%0d lane %0d: bad diagonal slot (%0d,%0d)/(%0d,%0d)", n_pts, l, r, c, r2, c2));
          end
        end
      end
      for (int a = 0; a < n_pts; a++)
        for (int b = 0; b < a; b++)
          check(seen[a][b], $sformatf("N=%0d: pair (%0d,%0d) never read", n_pts, a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
