// sdct_cu1: control unit CU-1 of the folded 2D-DCT.
//
// IDLE: data_in_ready = 1; 'start' latches the block's size code (sel_dct_in)
// and steering angle (z_in) and moves to ROW. ROW: data_in_ready = 1; each
// cycle with data_in_valid writes one row (row_we, row_idx = 0..N-1). COL:
// col_phase = out_valid = 1 and col_idx = 0..N-1 presents one DCT output column
// per cycle; a column advances only when out_ready (the FIFO is not full).
// done_1 is high with the last column's transfer, then CU-1 returns to IDLE.
// A block of N rows thus occupies the DCT for 2N cycles without stalls.
module sdct_cu1
  import sdct_pkg::*;
#(
  parameter int N_MAX = 32,
  parameter int AW    = $clog2(N_MAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  size_t         sel_dct_in,
  input  angle_t        z_in,
  input  logic          data_in_valid,
  output logic          data_in_ready,
  input  logic          out_ready,
  output logic          out_valid,
  output logic          row_we,
  output logic [AW-1:0] row_idx,
  output logic          col_phase,
  output logic [AW-1:0] col_idx,
  output size_t         size_q,
  output angle_t        angle_q,
  output logic          done_1
);
  typedef enum logic [1:0] {IDLE, ROW, COL} state_t;
  state_t        state;
  logic [AW-1:0] cnt, last;

  assign last          = AW'(size_n(size_q) - 1);
  assign data_in_ready = (state == IDLE) || (state == ROW);
  assign row_we        = (state == ROW) && data_in_valid;
  assign row_idx       = cnt;
  assign col_phase     = (state == COL);
  assign out_valid     = col_phase;
  assign col_idx       = cnt;
  assign done_1        = col_phase && out_ready && (cnt == last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      size_q  <= '0;
      angle_q <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          size_q  <= sel_dct_in;
          angle_q <= z_in;
          cnt     <= '0;
          state   <= ROW;
        end
        ROW: if (data_in_valid) begin
          if (cnt == last) begin
            cnt   <= '0;
            state <= COL;
          end else cnt <= cnt + 1'b1;
        end
        COL: if (out_ready) begin
          if (cnt == last) begin
            cnt   <= '0;
            state <= IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A block size must fit the datapath.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == IDLE && start) |-> (size_n(sel_dct_in) <= N_MAX));
endmodule
