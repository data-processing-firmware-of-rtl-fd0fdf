// tb_occupancy_monitor: drives a random occupancy profile and compares the
// peak (with one clear in the middle) and the windowed average with values
// computed here from the same samples.
module tb_occupancy_monitor;
  localparam int W = 8, WL = 4;
  logic clk = 0, rst_n = 1, clear = 0;
  initial begin rst_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #2 clk = ~clk;
  logic [W-1:0] usedw = 0, peak, avg;
  occupancy_monitor #(.W(W), .WIN_LOG2(WL)) dut (.clk, .rst_n, .usedw, .clear, .peak, .avg);
  int checks = 0, failures = 0;
  int m_peak = 0, m_avg = 0, sum = 0, n = 0;
  // reference: samples the same value at every rising edge out of reset
  always @(posedge clk) if (rst_n) begin
    if (clear) m_peak = usedw; else if (usedw > m_peak) m_peak = usedw;
    sum += usedw; n++;
    if (n == (1 << WL)) begin m_avg = sum >> WL; sum = 0; n = 0; end
  end
  initial begin
    #5 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (peak != W'(m_peak) || avg != W'(m_avg)) begin
        failures++; $display("cycle %0d peak %0d/%0d avg %0d/%0d", i, peak, m_peak, avg, m_avg);
      end
      usedw = W'(((i / 100) * 20) + ($urandom % 40));
      clear = (i == 500);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
