// sdct_im: input memory (IM) of the steerable block.
//
// Holds one block of DCT coefficients. Write mode (w_r_n1 = 1): d_in is one
// column of the block (d_in[u] = coefficient of vertical frequency u) and is
// stored at column add_w1; 'start' marks the first column of a block and
// latches the block's size code and steering angle. Read mode (w_r_n1 = 0):
// add_r1 is a step of the custom zig-zag schedule (sdct_pkg::zz_table). With
// L = min(LANES, N/2) lanes in use, a block has N*N/(2L) steps and lane l
// returns the pair of slot add_r1*L + l, x1 = IM[r1][c1] and x2 = IM[r2][c2].
// This reordering on read is what turns the column-ordered DCT output into the
// pair order of the rotation. Read data are registered: they appear one cycle
// after add_r1. Lanes l >= L carry don't-care values. LANES = N_MAX/2 is the
// full-rate organisation (N steps per block); fewer lanes give the narrower
// read ports of the faster steering-clock regimes. The schedule table's
// 'diag' bit is not needed here (the controller knows which steps are
// diagonal), so the lookup leaves it unused.
module sdct_im
  import sdct_pkg::*;
#(
  parameter int N_MAX = 32,
  parameter int LANES = N_MAX / 2,
  parameter int AW    = $clog2(N_MAX),
  parameter int SW    = $clog2(N_MAX * N_MAX / (2 * LANES))
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  angle_t                   angle,
  input  size_t                    sel_dct,
  input  logic signed [COEF_W-1:0] d_in [N_MAX],
  input  logic                     w_r_n1,
  input  logic [AW-1:0]            add_w1,
  input  logic [SW-1:0]            add_r1,
  output logic signed [COEF_W-1:0] x1 [LANES],
  output logic signed [COEF_W-1:0] x2 [LANES],
  output angle_t                   angle_q,
  output size_t                    sel_q
);
  localparam zz_tab_t ZZ0 = zz_table(0);
  localparam zz_tab_t ZZ1 = zz_table(1);
  localparam zz_tab_t ZZ2 = zz_table(2);
  localparam zz_tab_t ZZ3 = zz_table(3);

  logic signed [COEF_W-1:0] mem [N_MAX][N_MAX];   // [row u][column v]

  function automatic zz_slot_t lookup(input size_t sz, input int s);
    case (sz)
      2'd0:    return ZZ0[s];
      2'd1:    return ZZ1[s];
      2'd2:    return ZZ2[s];
      default: return ZZ3[s];
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      angle_q <= '0;
      sel_q   <= '0;
    end else if (w_r_n1 && start) begin
      angle_q <= angle;
      sel_q   <= sel_dct;
    end
  end

  always_ff @(posedge clk) begin
    if (w_r_n1) begin
      for (int u = 0; u < N_MAX; u++) mem[u][add_w1] <= d_in[u];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        x1[l] <= '0;
        x2[l] <= '0;
      end
    end else if (!w_r_n1) begin
      for (int l = 0; l < LANES; l++) begin
        zz_slot_t e;
        e = lookup(sel_q, 511 & (int'(add_r1) * lanes_for(LANES, sel_q) + l));
        x1[l] <= mem[e.r1[AW-1:0]][e.c1[AW-1:0]];
        x2[l] <= mem[e.r2[AW-1:0]][e.c2[AW-1:0]];
      end
    end
  end
endmodule
