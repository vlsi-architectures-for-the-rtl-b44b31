// tb_sdct_async_fifo: writes a numbered stream through the dual-clock FIFO
// with unrelated write and read clocks (periods 10 and 7, then 7 and 23) and
// random enables, and checks that every word arrives once, in order, that full
// is reached when the reader is slow, and that the FIFO drains to empty.
module tb_sdct_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  int wper = 5, rper = 4;
  int sent = 0, got = 0, full_seen = 0;
  localparam int TOTAL = 3000;

  sdct_async_fifo #(.WIDTH(32), .DEPTH(16)) dut (.wclk, .wrst_n(rst_n), .wr_en, .wdata, .full,
                                                .rclk, .rrst_n(rst_n), .rd_en, .rdata, .empty);

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("timeout: sent %0d got %0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inputs change at the falling edge; full/empty only change at their own
  // rising edges, so a transfer is known half a cycle ahead.
  always @(negedge wclk) if (rst_n) begin
    wr_en = (sent < TOTAL) && ($urandom_range(0, 3) != 0);
    wdata = 32'(sent) * 32'd2654435761;
    #1;
    if (full) full_seen++;
    if (wr_en && !full) sent++;
  end

  always @(negedge rclk) if (rst_n) begin
    rd_en = ($urandom_range(0, 3) != 0);
    #1;
    if (rd_en && !empty) begin
      checks++;
      if (rdata != 32'(got) * 32'd2654435761) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h", got, rdata);
      end
      got++;
    end
  end

  initial begin
    #30 rst_n = 1;
    wait (got >= TOTAL / 2);
    wper = 4; rper = 12;   // slow reader: the FIFO must fill up
    wait (got >= TOTAL);
    #500;
    checks += 3;
    if (!empty) begin failures++; $display("FIFO not empty at the end"); end
    if (full_seen == 0) begin failures++; $display("FIFO never full"); end
    if (sent != TOTAL) begin failures++; $display("sent %0d", sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
