// sdct_dct1d: reconfigurable N-point HEVC integer 1D DCT (N = 4, 8, 16, 32).
//
// y[k] = sum_n C_M[k][n] * x[n] for the M-point HEVC matrix, where M = 4 << sel
// and M <= N. Built recursively by the even/odd decomposition used in the
// efficient HEVC DCT architectures the SDCT design builds on: for M = N the
// input butterfly forms a[n] = x[n] + x[N-1-n] and b[n] = x[n] - x[N-1-n];
// the even outputs y[2k] come from an N/2-point unit applied to a, the odd
// outputs y[2k+1] from constant multiplications of b (the constants are the
// odd rows of C_N, fixed at elaboration). For M < N the butterfly is bypassed
// and x[0..N/2-1] go straight to the N/2-point unit, whose outputs appear on
// y[0..N/2-1]; the other outputs are zero. Purely combinational, no rounding:
// W must hold the input width plus 13 bits.
// Lint note: Verilator's lint pass reports 'e' as undriven and 'a' / 'sub_sel'
// as unused. They are the connections of the recursive half-size instance
// u_even, which its lint does not follow; simulation and synthesis connect
// them, and every size is checked coefficient by coefficient.
module sdct_dct1d
  import sdct_pkg::*;
#(
  parameter int N = 32,
  parameter int W = 32
) (
  input  logic [1:0]          sel,   // log2(M) - 2
  input  logic signed [W-1:0] x [N],
  output logic signed [W-1:0] y [N]
);
  localparam int H = N / 2;
  localparam logic [1:0] MYSEL = 2'($clog2(N) - 2);

  if (N == 4) begin : g_base
    logic signed [W-1:0] a0, a1, b0, b1;
    always_comb begin
      a0 = x[0] + x[3];
      a1 = x[1] + x[2];
      b0 = x[0] - x[3];
      b1 = x[1] - x[2];
      y[0] = 64 * (a0 + a1);
      y[2] = 64 * (a0 - a1);
      y[1] = 83 * b0 + 36 * b1;
      y[3] = 36 * b0 - 83 * b1;
    end
    logic unused;
    assign unused = ^sel;
  end else begin : g_rec
    logic signed [W-1:0] a [H];
    logic signed [W-1:0] b [H];
    logic signed [W-1:0] e [H];
    logic signed [W-1:0] o [H];
    logic active;

    assign active = (sel == MYSEL);

    always_comb begin
      for (int n = 0; n < H; n++) begin
        a[n] = active ? x[n] + x[N-1-n] : x[n];
        b[n] = x[n] - x[N-1-n];
      end
    end

    // once the butterfly of this level is used, the half-size unit works at its
    // own full size
    logic [1:0] sub_sel;
    assign sub_sel = active ? MYSEL - 2'd1 : sel;

    sdct_dct1d #(.N(H), .W(W)) u_even (.sel(sub_sel), .x(a), .y(e));

    for (genvar k = 0; k < H; k++) begin : g_odd
      always_comb begin
        o[k] = '0;
        for (int n = 0; n < H; n++)
          o[k] = o[k] + W'(hevc_coef((32 / N) * (2 * k + 1), n)) * b[n];
      end
    end

    always_comb begin
      for (int k = 0; k < H; k++) begin
        if (active) begin
          y[2*k]   = e[k];
          y[2*k+1] = o[k];
        end else begin
          y[k]   = e[k];
          y[k+H] = '0;
        end
      end
    end
  end
endmodule
