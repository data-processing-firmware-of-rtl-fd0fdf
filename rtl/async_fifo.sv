// async_fifo: dual-clock FIFO for the clock-domain crossings of the Input
// Block (framework clock -> processing clock) and the Output Block
// (processing clock -> PCIe clock).
//
// Classic Gray-code pointer design: each side keeps a binary and a Gray
// pointer one bit wider than the address, the opposite side's Gray pointer
// is brought over through a two-flop synchronizer, and full/empty are
// derived from the comparison. The read port is show-ahead: rd_data is the
// oldest word whenever rd_empty is low, and rd_en pops it. Each side reports
// its own view of the occupancy (wr_usedw, rd_usedw), which lags the other
// side by the synchronizer delay and so is conservative. Writes when full
// and reads when empty are ignored. DEPTH must be a power of two.
module async_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 512
) (
  input  logic                     wr_clk,
  input  logic                     wr_rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     wr_full,
  output logic [$clog2(DEPTH):0]   wr_usedw,
  input  logic                     rd_clk,
  input  logic                     rd_rst_n,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_empty,
  output logic [$clog2(DEPTH):0]   rd_usedw
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic do_wr;
  logic [AW:0] rbin_w;
  assign rbin_w   = gray2bin(rgray_w2);
  assign wr_usedw = wbin - rbin_w;
  assign wr_full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign do_wr    = wr_en && !wr_full;

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read side
  logic do_rd;
  logic [AW:0] wbin_r;
  assign wbin_r   = gray2bin(wgray_r2);
  assign rd_usedw = wbin_r - rbin;
  assign rd_empty = (rgray == wgray_r2);
  assign do_rd    = rd_en && !rd_empty;
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH)
    else $error("async_fifo: DEPTH must be a power of two >= 4");
endmodule
