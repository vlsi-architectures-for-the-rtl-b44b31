// sdct_cu3: control unit CU-3 of the steerable block.
//
// Three overlapping activities, each a counter:
//  * load: while the IM is not full (col_ready = 1), every column handed over by
//    CU-2 (col_valid) is written to IM column ld_cnt (w_r_n1 = 1); the first
//    column of a block raises im_start. The column flagged by CU-2's done_2
//    (col_last) is the last one: the IM is then full.
//  * rotate: when the IM is full and the OM is free, add_r1 steps 0..S-1 on
//    consecutive cycles (IM read mode), S = N*N/(2L) with L = min(LANES, N/2)
//    pairs per step; S = N with the default LANES = N_MAX/2. The step number
//    and a bypass flag (angle 0, or one of the last N/(2L) steps, which hold
//    the diagonal elements) travel
//    down a 3-stage delay line and come out as w_r_n2 / add_w2 / mux_sel, in
//    step with the rotated pairs. The IM is free again after the last read.
//  * output: after the last OM write, rd_en reads columns 0..N-1 (add_r2) on
//    consecutive cycles; rd_last marks column N-1. The OM is then free.
// With back-to-back input and the default LANES, the first output column leaves
// the OM 2N+4 cycles after the first input column entered the IM (2N
// reordering + 4 pipeline), the latency the SDCT design specifies; with fewer
// lanes it is N + S + 4. Loading the next block overlaps with the
// output of the current one. N comes from the size code of each block.
module sdct_cu3
  import sdct_pkg::*;
#(
  parameter int N_MAX = 32,
  parameter int LANES = N_MAX / 2,
  parameter int AW    = $clog2(N_MAX),
  parameter int SW    = $clog2(N_MAX * N_MAX / (2 * LANES))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          col_valid,
  input  logic          col_last,    // done_2 from CU-2: last column of a block
  input  size_t         col_size,
  input  angle_t        col_angle,
  output logic          col_ready,
  output logic          im_start,
  output logic          w_r_n1,
  output logic [AW-1:0] add_w1,
  output logic [SW-1:0] add_r1,
  output logic          mux_sel,
  output logic          w_r_n2,
  output logic [SW-1:0] add_w2,
  output logic          rd_en,
  output logic          rd_last,
  output logic [AW-1:0] add_r2
);
  typedef struct packed {
    logic          valid;
    logic [SW-1:0] step;
    logic          bypass;
  } dly_t;

  logic [AW-1:0] ld_cnt, out_cnt;
  logic [SW-1:0] rot_cnt;
  logic          im_full, om_busy, om_full;
  size_t         ld_size, rot_size, out_size;
  angle_t        ld_angle;
  logic          rot_fire;
  dly_t          dly [3];
  logic [SW-1:0] rot_last, rot_diag, wr_last;
  logic [AW-1:0] out_last;

  assign rot_last = SW'(steps_for(LANES, ld_size) - 1);
  // first step that holds diagonal elements: the last N/2 slots of the block
  assign rot_diag = SW'(steps_for(LANES, ld_size) - size_n(ld_size) / 2 / lanes_for(LANES, ld_size));
  assign out_last = AW'(size_n(out_size) - 1);
  assign wr_last  = SW'(steps_for(LANES, rot_size) - 1);

  assign col_ready = !im_full;
  assign w_r_n1    = col_valid && col_ready;
  assign im_start  = w_r_n1 && (ld_cnt == '0);
  assign add_w1    = ld_cnt;

  assign rot_fire  = im_full && (rot_cnt != '0 || !om_busy);
  assign add_r1    = rot_cnt;

  assign w_r_n2  = dly[2].valid;
  assign add_w2  = dly[2].step;
  assign mux_sel = dly[2].bypass;

  assign rd_en   = om_full;
  assign add_r2  = out_cnt;
  assign rd_last = om_full && (out_cnt == out_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_cnt   <= '0;
      rot_cnt  <= '0;
      out_cnt  <= '0;
      im_full  <= 1'b0;
      om_busy  <= 1'b0;
      om_full  <= 1'b0;
      ld_size  <= '0;
      ld_angle <= '0;
      rot_size <= '0;
      out_size <= '0;
      for (int i = 0; i < 3; i++) dly[i] <= '0;
    end else begin
      // load
      if (w_r_n1) begin
        if (ld_cnt == '0) begin
          ld_size  <= col_size;
          ld_angle <= col_angle;
        end
        if (col_last) begin
          ld_cnt  <= '0;
          im_full <= 1'b1;
        end else begin
          ld_cnt <= ld_cnt + 1'b1;
        end
      end
      // rotate
      dly[0] <= '{valid: rot_fire, step: rot_cnt,
                  bypass: (ld_angle == '0) || (rot_cnt >= rot_diag)};
      dly[1] <= dly[0];
      dly[2] <= dly[1];
      if (rot_fire) begin
        om_busy <= 1'b1;
        if (rot_cnt == '0) rot_size <= ld_size;
        if (rot_cnt == rot_last) begin
          rot_cnt <= '0;
          im_full <= 1'b0;
        end else begin
          rot_cnt <= rot_cnt + 1'b1;
        end
      end
      if (dly[2].valid && dly[2].step == wr_last) begin
        om_full  <= 1'b1;
        out_size <= rot_size;
      end
      // output
      if (om_full) begin
        if (out_cnt == out_last) begin
          out_cnt <= '0;
          om_full <= 1'b0;
          om_busy <= 1'b0;
        end else begin
          out_cnt <= out_cnt + 1'b1;
        end
      end
    end
  end

  // The OM is never written while it is being read out.
  assert property (@(posedge clk) disable iff (!rst_n) !(w_r_n2 && rd_en));
  // The IM is never written while it is being rotated.
  assert property (@(posedge clk) disable iff (!rst_n) !(w_r_n1 && rot_fire));
endmodule
