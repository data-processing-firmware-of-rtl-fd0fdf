// occupancy_monitor: peak and average occupancy of one FIFO, for the ECS.
//
// The occupancy is sampled every cycle. The peak holds the largest sample
// since reset or the last `clear`. The average is taken over consecutive
// windows of 2**WIN_LOG2 samples: the samples are summed in an accumulator
// and, at the end of each window, the sum shifted right by WIN_LOG2 becomes
// the new average (so avg lags by up to one window). The window length is
// this design's choice; the published firmware maps the accumulation onto
// DSP blocks, which a synthesis tool may do with this adder too.
module occupancy_monitor #(
  parameter int W        = 10,
  parameter int WIN_LOG2 = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] usedw,
  input  logic         clear,
  output logic [W-1:0] peak,
  output logic [W-1:0] avg
);
  logic [W+WIN_LOG2-1:0] sum, sum_next;
  logic [WIN_LOG2-1:0]   n;

  assign sum_next = sum + (W+WIN_LOG2)'(usedw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      peak <= '0; avg <= '0; sum <= '0; n <= '0;
    end else begin
      if (clear)              peak <= usedw;
      else if (usedw > peak)  peak <= usedw;
      n <= n + 1'b1;
      if (n == '1) begin
        avg <= W'(sum_next >> WIN_LOG2);
        sum <= '0;
      end else begin
        sum <= sum_next;
      end
    end
  end
endmodule
