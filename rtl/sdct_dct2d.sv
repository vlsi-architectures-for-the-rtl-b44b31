// sdct_dct2d: folded 2D-DCT datapath (HEVC integer DCT, sizes 4..32).
//
// One reconfigurable 1D DCT (sdct_dct1d) serves both passes of the separable
// transform Y = C X C^T, which is the folded organisation the SDCT design takes
// for its DCT part:
//  * row pass (row_we = 1): data_in is row row_idx of the residual block X;
//    its 1D DCT, rounded and shifted right by log2(N)-1 and saturated to 16
//    bits, is written into row row_idx of the transposition memory.
//  * column pass (col_phase = 1): column col_idx of the transposition memory
//    goes through the same 1D DCT, is rounded, shifted by log2(N)+6 and
//    saturated; out_col is then column col_idx of Y (out_col[u] = Y[u][col_idx]).
// The shifts are those of the HEVC forward transform for 8-bit video. N rows
// in, N columns out: N*N samples per 2N cycles, i.e. 16 samples per cycle at
// N = 32. The 1D DCT and the output are combinational; the sequencing
// (size code sel, indices, phases) comes from the controller sdct_cu1.
module sdct_dct2d
  import sdct_pkg::*;
#(
  parameter int N_MAX = 32,
  parameter int AW    = $clog2(N_MAX)
) (
  input  logic                     clk,
  input  size_t                    sel,
  input  logic                     row_we,
  input  logic [AW-1:0]            row_idx,
  input  logic                     col_phase,
  input  logic [AW-1:0]            col_idx,
  input  logic signed [PIX_W-1:0]  data_in [N_MAX],
  output logic signed [COEF_W-1:0] out_col [N_MAX]
);
  localparam int W = 32;

  logic signed [COEF_W-1:0] tmem [N_MAX][N_MAX];   // [row][frequency]
  logic signed [W-1:0] x [N_MAX];
  logic signed [W-1:0] y [N_MAX];
  logic signed [COEF_W-1:0] rnd [N_MAX];
  int shift;

  sdct_dct1d #(.N(N_MAX), .W(W)) u_dct1d (.sel, .x, .y);

  always_comb begin
    shift = col_phase ? int'(sel) + 8 : int'(sel) + 1;   // log2N+6 : log2N-1
    for (int i = 0; i < N_MAX; i++) begin
      x[i]   = col_phase ? W'(tmem[i][col_idx]) : W'(data_in[i]);
      rnd[i] = sat_coef(48'((64'(y[i]) + (64'sd1 <<< (shift - 1))) >>> shift));
    end
  end

  always_ff @(posedge clk) begin
    if (row_we) begin
      for (int k = 0; k < N_MAX; k++) tmem[row_idx][k] <= rnd[k];
    end
  end

  assign out_col = rnd;
endmodule
