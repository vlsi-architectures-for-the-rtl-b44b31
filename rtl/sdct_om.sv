// sdct_om: output memory (OM) of the steerable block.
//
// Write mode (w_r_n2 = 1): add_w2 is the zig-zag step whose rotated pairs are on
// y1/y2; lane l writes y1 to position (r1,c1) and y2 to (r2,c2) of slot
// add_w2*L + l (sdct_pkg::zz_table), only for lanes l < L = min(LANES, N/2),
// the same schedule the IM reads with (the table's 'diag' bit is unused). At step 0 the
// block's size code and angle (sel_in, angle_in) are latched and the size is
// used for the rest of the block. Read (rd_en = 1): column add_r2 of the block
// appears on d_out one cycle later with data_out_valid; rows u >= N read as
// zero. rd_last marks the last column and produces 'done' with it. angle_out
// and sel_dct_out give the tags of the block being read.
module sdct_om
  import sdct_pkg::*;
#(
  parameter int N_MAX = 32,
  parameter int LANES = N_MAX / 2,
  parameter int AW    = $clog2(N_MAX),
  parameter int SW    = $clog2(N_MAX * N_MAX / (2 * LANES))
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     w_r_n2,
  input  logic [SW-1:0]            add_w2,
  input  angle_t                   angle_in,
  input  size_t                    sel_in,
  input  logic signed [COEF_W-1:0] y1 [LANES],
  input  logic signed [COEF_W-1:0] y2 [LANES],
  input  logic                     rd_en,
  input  logic                     rd_last,
  input  logic [AW-1:0]            add_r2,
  output logic signed [COEF_W-1:0] d_out [N_MAX],
  output logic                     data_out_valid,
  output logic                     done,
  output angle_t                   angle_out,
  output size_t                    sel_dct_out
);
  localparam zz_tab_t ZZ0 = zz_table(0);
  localparam zz_tab_t ZZ1 = zz_table(1);
  localparam zz_tab_t ZZ2 = zz_table(2);
  localparam zz_tab_t ZZ3 = zz_table(3);

  logic signed [COEF_W-1:0] mem [N_MAX][N_MAX];
  angle_t angle_q;
  size_t  sel_q;
  size_t  wsel;

  function automatic zz_slot_t lookup(input size_t sz, input int s);
    case (sz)
      2'd0:    return ZZ0[s];
      2'd1:    return ZZ1[s];
      2'd2:    return ZZ2[s];
      default: return ZZ3[s];
    endcase
  endfunction

  assign wsel = (add_w2 == '0) ? sel_in : sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      angle_q <= '0;
      sel_q   <= '0;
    end else if (w_r_n2 && add_w2 == '0) begin
      angle_q <= angle_in;
      sel_q   <= sel_in;
    end
  end

  always_ff @(posedge clk) begin
    if (w_r_n2) begin
      for (int l = 0; l < LANES; l++) begin
        if (l < lanes_for(LANES, wsel)) begin
          zz_slot_t e;
          e = lookup(wsel, 511 & (int'(add_w2) * lanes_for(LANES, wsel) + l));
          mem[e.r1[AW-1:0]][e.c1[AW-1:0]] <= y1[l];
          mem[e.r2[AW-1:0]][e.c2[AW-1:0]] <= y2[l];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out_valid <= 1'b0;
      done           <= 1'b0;
      angle_out      <= '0;
      sel_dct_out    <= '0;
      for (int u = 0; u < N_MAX; u++) d_out[u] <= '0;
    end else begin
      data_out_valid <= rd_en;
      done           <= rd_en && rd_last;
      if (rd_en) begin
        angle_out   <= angle_q;
        sel_dct_out <= sel_q;
        for (int u = 0; u < N_MAX; u++)
          d_out[u] <= (u < size_n(sel_q)) ? mem[u][add_r2] : '0;
      end
    end
  end
endmodule
