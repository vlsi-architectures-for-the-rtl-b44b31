// sdct_steerable: steering part of the SDCT (IM -> lifting rotators -> OM).
//
// Structure as in the SDCT block diagram: an input memory (IM), LANES lifting
// rotators with a bypass multiplexer on each, and an output memory (OM); a
// small ROM turns the block's angle into the lifting constants P and U. All
// control pins (w_r_n1, add_w1, add_r1, mux_sel, w_r_n2, add_w2, rd_en,
// rd_last, add_r2) come from the controller sdct_cu3, which also fixes the
// timing: a block is written into the IM in N cycles, read as L = min(LANES,
// N/2) pairs per cycle in N*N/(2L) cycles, and each pair reaches the OM 4
// cycles after its read
// address (IM read register, two lifting registers, OM write). mux_sel = 1
// passes the pair unrotated (angle 0, or the slots holding diagonal elements).
// The bypass path is delayed by two registers to line up with the rotators.
// LANES defaults to N_MAX/2 (N steps per block, the steering clock only a
// little faster than the DCT clock); N_MAX/4, N_MAX/8 and N_MAX/16 are the
// regimes with a 2, 4 or 8 times faster steering clock and fewer rotators.
module sdct_steerable
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
  input  logic signed [COEF_W-1:0] d_in [N_MAX],
  input  angle_t                   angle,
  input  size_t                    sel_dct,
  input  logic                     w_r_n1,
  input  logic [AW-1:0]            add_w1,
  input  logic [SW-1:0]            add_r1,
  input  logic                     mux_sel,
  input  logic                     w_r_n2,
  input  logic [SW-1:0]            add_w2,
  input  logic                     rd_en,
  input  logic                     rd_last,
  input  logic [AW-1:0]            add_r2,
  output logic signed [COEF_W-1:0] d_out [N_MAX],
  output logic                     data_out_valid,
  output logic                     done,
  output angle_t                   angle_out,
  output size_t                    sel_dct_out
);
  localparam int L = LANES;

  logic signed [COEF_W-1:0] x1 [L], x2 [L];
  logic signed [COEF_W-1:0] r1 [L], r2 [L];
  logic signed [COEF_W-1:0] b1a [L], b2a [L], b1b [L], b2b [L];
  logic signed [COEF_W-1:0] m1 [L], m2 [L];
  angle_t     im_angle;
  size_t      im_sel;
  logic [7:0] p, u_mag;

  sdct_im #(.N_MAX(N_MAX), .LANES(LANES)) u_im (
    .clk, .rst_n, .start, .angle, .sel_dct, .d_in,
    .w_r_n1, .add_w1, .add_r1, .x1, .x2,
    .angle_q(im_angle), .sel_q(im_sel)
  );

  sdct_rom u_rom (.angle(im_angle), .p, .u_mag);

  for (genvar l = 0; l < L; l++) begin : g_lane
    sdct_lifting #(.W(COEF_W)) u_lift (
      .clk, .rst_n, .x1(x1[l]), .x2(x2[l]), .p, .u_mag,
      .y1(r1[l]), .y2(r2[l])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        b1a[l] <= '0; b2a[l] <= '0; b1b[l] <= '0; b2b[l] <= '0;
      end else begin
        b1a[l] <= x1[l];  b2a[l] <= x2[l];
        b1b[l] <= b1a[l]; b2b[l] <= b2a[l];
      end
    end
    assign m1[l] = mux_sel ? b1b[l] : r1[l];
    assign m2[l] = mux_sel ? b2b[l] : r2[l];
  end

  sdct_om #(.N_MAX(N_MAX), .LANES(LANES)) u_om (
    .clk, .rst_n, .w_r_n2, .add_w2, .angle_in(im_angle), .sel_in(im_sel),
    .y1(m1), .y2(m2), .rd_en, .rd_last, .add_r2,
    .d_out, .data_out_valid, .done, .angle_out, .sel_dct_out
  );
endmodule
