// sdct_cu2: control unit CU-2 of the FIFO (steering-clock side).
//
// Hands FIFO words to the steerable block: col_valid = FIFO not empty, and a
// word is popped (fifo_rd_en) when CU-3 can take it (col_ready). Each word
// carries the 'last' flag written with CU-1's done_1; CU-2 turns it into
// done_2, high with the transfer of the last column of a block, and counts the
// columns of the block in flight (col_cnt) to check that done_2 comes after
// exactly N columns. blocks counts the blocks passed on (wraps).
module sdct_cu2
  import sdct_pkg::*;
#(
  parameter int N_MAX = 32,
  parameter int AW    = $clog2(N_MAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fifo_empty,
  input  logic          fifo_last,
  input  size_t         fifo_size,
  output logic          fifo_rd_en,
  input  logic          col_ready,
  output logic          col_valid,
  output logic          done_2,
  output logic [AW-1:0] col_cnt,
  output logic [15:0]   blocks
);
  assign col_valid  = !fifo_empty;
  assign fifo_rd_en = col_valid && col_ready;
  assign done_2     = fifo_rd_en && fifo_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt <= '0;
      blocks  <= '0;
    end else if (fifo_rd_en) begin
      if (fifo_last) begin
        col_cnt <= '0;
        blocks  <= blocks + 1'b1;
      end else begin
        col_cnt <= col_cnt + 1'b1;
      end
    end
  end

  // done_1/done_2 must mark the N-th column of a block.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fifo_rd_en |-> (fifo_last == (int'(col_cnt) == size_n(fifo_size) - 1)))
    else $error("block length does not match its size code");
endmodule
