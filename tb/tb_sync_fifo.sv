// tb_sync_fifo: random pushes and pops (also simultaneous, also when full)
// on a small FIFO, checked against a reference queue: data order, the exact
// occupancy count and the full/empty flags.
module tb_sync_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 1;
  initial begin rst_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #2 clk = ~clk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wr_data = 0, rd_data;
  logic [3:0] usedw;
  sync_fifo #(.WIDTH(16), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .usedw);
  logic [15:0] q[$];
  int checks = 0, failures = 0;
  initial begin
    #5 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (usedw != 4'(q.size()) || full != (q.size() == D) || empty != (q.size() == 0)) begin
        failures++; $display("count %0d/%0d full %b empty %b", usedw, q.size(), full, empty);
      end
      if (!empty) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("data %h exp %h", rd_data, q[0]); end
      end
      wr_en = ($urandom % 100) < ((i / 500) % 2 ? 70 : 35);
      rd_en = ($urandom % 100) < ((i / 500) % 2 ? 35 : 70);
      wr_data = 16'($urandom);
      begin
        bit r, w;
        r = rd_en && q.size() != 0;
        w = wr_en && (q.size() < D || r);
        @(posedge clk);
        if (r) void'(q.pop_front());
        if (w) q.push_back(wr_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
