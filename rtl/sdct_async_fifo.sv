// sdct_async_fifo: dual-clock FIFO between the DCT and the steering clock.
//
// Buffers DCT output columns (with their block tags) so that the steering part
// can run on its own, faster clock. Classic design: binary read/write pointers
// with one extra wrap bit, Gray-coded copies crossing the domains through two
// flip-flops each. Full is computed in the write domain, empty in the read
// domain, both conservatively. First-word-fall-through read side: rdata shows
// the oldest word whenever empty = 0, and rd_en pops it. A write while full
// and a read while empty are ignored. DEPTH must be a power
// of two. The SDCT design only says a FIFO buffers the two parts; depth,
// width and the Gray-pointer scheme are this implementation's choices.
module sdct_async_fifo #(
  parameter int WIDTH = 518,
  parameter int DEPTH = 32,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray, rq1_wgray, rq2_wgray;
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_nx = wbin + (AW+1)'(wr_en && !full);
  assign rbin_nx = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; wq1_rgray <= '0; wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_nx;
      wgray     <= bin2gray(wbin_nx);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; rq1_wgray <= '0; rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_nx;
      rgray     <= bin2gray(rbin_nx);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end

  assign full  = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
  assign empty = (rgray == rq2_wgray);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
