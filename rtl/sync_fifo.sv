// sync_fifo: single-clock FIFO used as the output buffers of the Mini Lane
// Builders (one for data words, one for event descriptors).
//
// Show-ahead read port: rd_data is the oldest word whenever empty is low and
// rd_en pops it. usedw is the exact occupancy, used by the occupancy
// monitors and, through full, by the producer to hold back (back-pressure).
// A write and a read in the same cycle are both accepted, also when full.
module sync_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  output logic                   full,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       rd_data,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] usedw
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_wr, do_rd;

  assign empty   = (usedw == 0);
  assign full    = (usedw == DEPTH[AW:0]);
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; usedw <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      usedw <= usedw + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("sync_fifo: DEPTH must be a power of two >= 2");
endmodule
