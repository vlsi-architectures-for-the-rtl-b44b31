// sdct_top: Steerable DCT (SDCT) accelerator, sizes 4x4 .. 32x32.
//
// The SDCT of a residual block is its separable 2D DCT followed by rotations
// of coefficient pairs (u,v)/(v,u) by one of 8 steering angles. The chain is:
//   CU-1 + sdct_dct2d  folded HEVC 2D-DCT, clock clk: N rows in, N columns out
//   CU-2 + FIFO        dual-clock buffer of DCT columns, tagged with size/angle
//   CU-3 + steerable   IM -> LANES lifting rotators (with bypass) -> OM, clock
//                      clk_st, which is meant to run faster than clk
// done_1 (last DCT column) travels through the FIFO as the word's 'last' bit
// and becomes done_2 at its output; done_3 / done marks the last output column.
//
// Interface: in IDLE (data_in_ready = 1) a one-cycle 'start' gives the block's
// size code sel_dct_in (0:4, 1:8, 2:16, 3:32) and angle index z_in (0 = plain
// DCT); then N rows of residuals follow on data_in[0..N-1] with data_in_valid
// while data_in_ready = 1. The SDCT coefficients come out on clk_st, one column
// per data_out_valid cycle (data_out[u] = coefficient (u, column)), N columns per
// block, with the block's sel_dct_out / z_out; rows u >= N are zero.
// Timing: the DCT takes 2N clk cycles per block; with the default LANES =
// N_MAX/2 the steering part adds 2N+4 clk_st cycles from its first input
// column to its first output column (N load + N rotation steps + 4). LANES =
// N_MAX/4, /8, /16 selects the 2x, 4x, 8x steering-clock regimes: the
// rotation then takes N*N/(2*min(LANES, N/2)) steps and clk_st must be that
// much faster.
// The separate steering clock and the FIFO follow the SDCT design; the word
// widths (9-bit residuals, 16-bit coefficients), FIFO depth and handshakes are
// this implementation's choices. Both clocks share rst_n (asynchronous assert;
// release it synchronously to each clock).
module sdct_top
  import sdct_pkg::*;
#(
  parameter int N_MAX      = 32,
  parameter int FIFO_DEPTH = 32,
  parameter int LANES      = N_MAX / 2
) (
  input  logic                     clk,
  input  logic                     clk_st,
  input  logic                     rst_n,
  input  logic                     start,
  input  size_t                    sel_dct_in,
  input  angle_t                   z_in,
  input  logic                     data_in_valid,
  input  logic signed [PIX_W-1:0]  data_in [N_MAX],
  output logic                     data_in_ready,
  output logic                     data_out_valid,
  output logic signed [COEF_W-1:0] data_out [N_MAX],
  output logic                     done,
  output size_t                    sel_dct_out,
  output angle_t                   z_out
);
  localparam int AW = $clog2(N_MAX);
  localparam int SW = $clog2(N_MAX * N_MAX / (2 * LANES));
  localparam int FW = 6 + COEF_W * N_MAX;

  // ---------------- DCT clock domain ----------------
  logic          row_we, col_phase, dct_valid, fifo_full, done_1;
  logic [AW-1:0] row_idx, col_idx;
  size_t         blk_size;
  angle_t        blk_angle;
  logic signed [COEF_W-1:0] dct_col [N_MAX];
  logic [FW-1:0] fifo_wdata, fifo_rdata;

  sdct_cu1 #(.N_MAX(N_MAX)) u_cu1 (
    .clk, .rst_n, .start, .sel_dct_in, .z_in, .data_in_valid, .data_in_ready,
    .out_ready(!fifo_full), .out_valid(dct_valid), .row_we, .row_idx,
    .col_phase, .col_idx, .size_q(blk_size), .angle_q(blk_angle), .done_1
  );

  sdct_dct2d #(.N_MAX(N_MAX)) u_dct2d (
    .clk, .sel(blk_size), .row_we, .row_idx, .col_phase, .col_idx,
    .data_in, .out_col(dct_col)
  );

  always_comb begin
    fifo_wdata = '0;
    fifo_wdata[FW-1]      = done_1;
    fifo_wdata[FW-2:FW-3] = blk_size;
    fifo_wdata[FW-4:FW-6] = blk_angle;
    for (int u = 0; u < N_MAX; u++)
      fifo_wdata[u*COEF_W +: COEF_W] = dct_col[u];
  end

  // ---------------- clock crossing ----------------
  logic fifo_empty, fifo_rd_en;

  sdct_async_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(dct_valid && !fifo_full), .wdata(fifo_wdata),
    .full(fifo_full),
    .rclk(clk_st), .rrst_n(rst_n), .rd_en(fifo_rd_en), .rdata(fifo_rdata),
    .empty(fifo_empty)
  );

  // ---------------- steering clock domain ----------------
  logic          col_valid, col_ready, done_2, im_start;
  logic          w_r_n1, mux_sel, w_r_n2, rd_en, rd_last;
  logic [AW-1:0] add_w1, add_r2, cu2_cnt;
  logic [SW-1:0] add_r1, add_w2;
  logic [15:0]   cu2_blocks;
  size_t         st_size;
  angle_t        st_angle;
  logic signed [COEF_W-1:0] st_col [N_MAX];

  assign st_size  = fifo_rdata[FW-2:FW-3];
  assign st_angle = fifo_rdata[FW-4:FW-6];
  always_comb
    for (int u = 0; u < N_MAX; u++) st_col[u] = fifo_rdata[u*COEF_W +: COEF_W];

  sdct_cu2 #(.N_MAX(N_MAX)) u_cu2 (
    .clk(clk_st), .rst_n, .fifo_empty, .fifo_last(fifo_rdata[FW-1]),
    .fifo_size(st_size), .fifo_rd_en, .col_ready, .col_valid, .done_2,
    .col_cnt(cu2_cnt), .blocks(cu2_blocks)
  );

  sdct_cu3 #(.N_MAX(N_MAX), .LANES(LANES)) u_cu3 (
    .clk(clk_st), .rst_n, .col_valid, .col_last(done_2), .col_size(st_size),
    .col_angle(st_angle), .col_ready, .im_start, .w_r_n1, .add_w1, .add_r1,
    .mux_sel, .w_r_n2, .add_w2, .rd_en, .rd_last, .add_r2
  );

  sdct_steerable #(.N_MAX(N_MAX), .LANES(LANES)) u_steer (
    .clk(clk_st), .rst_n, .start(im_start), .d_in(st_col), .angle(st_angle),
    .sel_dct(st_size), .w_r_n1, .add_w1, .add_r1, .mux_sel, .w_r_n2, .add_w2,
    .rd_en, .rd_last, .add_r2, .d_out(data_out), .data_out_valid, .done,
    .angle_out(z_out), .sel_dct_out
  );

  logic unused;
  assign unused = ^{cu2_cnt, cu2_blocks};
endmodule
