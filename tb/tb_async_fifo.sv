// tb_async_fifo: random writes and reads on unrelated clocks through a small
// dual-clock FIFO. Every word read is compared with a reference queue;
// writes are only attempted when not full and reads when not empty, and the
// test checks that the FIFO fills completely (full seen) and drains
// (empty seen), and that neither side's occupancy exceeds the depth.
module tb_async_fifo;
  localparam int D = 16;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  initial begin wrst_n = 0; rrst_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #3 wclk = ~wclk;
  always #7 rclk = ~rclk;
  logic wr_en = 0, rd_en = 0, wr_full, rd_empty;
  logic [31:0] wr_data = 0, rd_data;
  logic [4:0] wr_usedw, rd_usedw;
  async_fifo #(.WIDTH(32), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .wr_full, .wr_usedw,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .rd_empty, .rd_usedw);
  logic [31:0] q[$];
  int checks = 0, failures = 0, nw = 0, nr = 0, full_seen = 0;
  bit slow_rd = 0;
  always @(negedge wclk) begin
    if (wrst_n) begin
      if (wr_en && !wr_full) ; // accepted at the posedge before
      wr_en = 0;
      if (nw < 2000 && !wr_full && $urandom % 3 != 0) begin
        wr_data = $urandom; wr_en = 1;
      end
    end
  end
  always @(posedge wclk) if (wr_en && !wr_full) begin q.push_back(wr_data); nw++; end
  always @(posedge wclk) begin
    if (wr_full) full_seen++;
    checks++;
    if (wr_usedw > D) begin failures++; $display("wr_usedw %0d", wr_usedw); end
  end
  always @(negedge rclk) begin
    rd_en = 0;
    if (rrst_n && !rd_empty && (!slow_rd || $urandom % 8 == 0)) rd_en = 1;
  end
  always @(posedge rclk) if (rd_en && !rd_empty) begin
    checks++;
    if (q.size() == 0 || rd_data != q[0]) begin
      failures++; $display("read %h expected %h", rd_data, q.size() ? q[0] : 0);
    end
    if (q.size()) void'(q.pop_front());
    nr++;
  end
  initial begin
    #20 wrst_n = 1; rrst_n = 1;
    slow_rd = 1;
    wait (nw >= 600);
    slow_rd = 0;
    wait (nw == 2000 && nr == 2000);
    repeat (5) @(posedge rclk);
    checks++;
    if (!rd_empty || full_seen == 0) begin failures++; $display("empty %b full_seen %0d", rd_empty, full_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
