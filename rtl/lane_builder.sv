// lane_builder: reduces the event streams of the NASIC ASICs of one lane to a
// single lane event stream, built recursively from mini_lane_builder.
//
// NASIC = 2: one Mini Lane Builder merges ASIC 0 (side A) and ASIC 1.
// NASIC = 4: two first-layer Mini Lane Builders merge ASICs 0+1 and 2+3, and a
// third merges their outputs; every Mini Lane Builder has its own output
// buffers, so the tree is elastic and back-pressure passes level by level.
// The per-ASIC descriptors of the Input Block are widened to evt_meta_t here
// (ASIC header in bits [7:0], one enable bit). The lane output carries
// packed words of four hits (zero-filled last word) and one descriptor per
// event with the lane hit count and the headers of ASIC 0..3 in bytes 0..3.
module lane_builder
  import dp_pkg::*;
#(
  parameter int NASIC      = 4,
  parameter int DATA_DEPTH = 256,
  parameter int EVT_DEPTH  = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [NASIC-1:0] asic_en,
  // from the Input Block
  input  asic_evt_t  in_evt       [NASIC],
  input  logic       in_evt_empty [NASIC],
  output logic       in_evt_rd    [NASIC],
  input  hword_t     in_data      [NASIC],
  input  logic       in_data_empty[NASIC],
  output logic       in_data_rd   [NASIC],
  // lane output (show-ahead)
  output evt_meta_t  out_evt,
  output logic       out_evt_empty,
  input  logic       out_evt_rd,
  output hword_t     out_data,
  output logic       out_data_empty,
  input  logic       out_data_rd,
  // monitoring
  output logic [$clog2(EVT_DEPTH):0] final_evt_usedw,
  output logic [$clog2(EVT_DEPTH):0] inter_evt_usedw,
  output logic       fifo_full,
  output logic       bxid_err
);
  evt_meta_t leaf [NASIC];
  for (genvar a = 0; a < NASIC; a++) begin : g_leaf
    always_comb begin
      leaf[a]       = '0;
      leaf[a].bxid  = in_evt[a].bxid;
      leaf[a].nhits = 8'(in_evt[a].nhits);
      leaf[a].heads = 32'(in_evt[a].head);
      leaf[a].en    = 4'b0001;
    end
  end

  if (NASIC == 2) begin : g_two
    logic full0, err0;
    mini_lane_builder #(.NA(1), .NB(1), .DATA_DEPTH(DATA_DEPTH), .EVT_DEPTH(EVT_DEPTH)) u_mlb (
      .clk, .rst_n, .en_a(asic_en[0]), .en_b(asic_en[1]),
      .a_evt(leaf[0]), .a_evt_empty(in_evt_empty[0]), .a_evt_rd(in_evt_rd[0]),
      .a_data(in_data[0]), .a_data_empty(in_data_empty[0]), .a_data_rd(in_data_rd[0]),
      .b_evt(leaf[1]), .b_evt_empty(in_evt_empty[1]), .b_evt_rd(in_evt_rd[1]),
      .b_data(in_data[1]), .b_data_empty(in_data_empty[1]), .b_data_rd(in_data_rd[1]),
      .out_evt, .out_evt_empty, .out_evt_rd, .out_data, .out_data_empty, .out_data_rd,
      .out_evt_usedw(final_evt_usedw), .out_full(full0), .bxid_err(err0)
    );
    assign inter_evt_usedw = '0;
    assign fifo_full = full0;
    assign bxid_err  = err0;
  end else begin : g_four
    evt_meta_t m_evt [2];
    hword_t    m_data[2];
    logic m_evt_empty[2], m_evt_rd[2], m_data_empty[2], m_data_rd[2];
    logic m_full[3], m_err[3];
    logic [$clog2(EVT_DEPTH):0] m_usedw[2];

    for (genvar k = 0; k < 2; k++) begin : g_l1
      mini_lane_builder #(.NA(1), .NB(1), .DATA_DEPTH(DATA_DEPTH), .EVT_DEPTH(EVT_DEPTH)) u_mlb (
        .clk, .rst_n, .en_a(asic_en[2*k]), .en_b(asic_en[2*k+1]),
        .a_evt(leaf[2*k]), .a_evt_empty(in_evt_empty[2*k]), .a_evt_rd(in_evt_rd[2*k]),
        .a_data(in_data[2*k]), .a_data_empty(in_data_empty[2*k]), .a_data_rd(in_data_rd[2*k]),
        .b_evt(leaf[2*k+1]), .b_evt_empty(in_evt_empty[2*k+1]), .b_evt_rd(in_evt_rd[2*k+1]),
        .b_data(in_data[2*k+1]), .b_data_empty(in_data_empty[2*k+1]), .b_data_rd(in_data_rd[2*k+1]),
        .out_evt(m_evt[k]), .out_evt_empty(m_evt_empty[k]), .out_evt_rd(m_evt_rd[k]),
        .out_data(m_data[k]), .out_data_empty(m_data_empty[k]), .out_data_rd(m_data_rd[k]),
        .out_evt_usedw(m_usedw[k]), .out_full(m_full[k]), .bxid_err(m_err[k])
      );
    end

    mini_lane_builder #(.NA(2), .NB(2), .DATA_DEPTH(DATA_DEPTH), .EVT_DEPTH(EVT_DEPTH)) u_top (
      .clk, .rst_n, .en_a(|asic_en[1:0]), .en_b(|asic_en[3:2]),
      .a_evt(m_evt[0]), .a_evt_empty(m_evt_empty[0]), .a_evt_rd(m_evt_rd[0]),
      .a_data(m_data[0]), .a_data_empty(m_data_empty[0]), .a_data_rd(m_data_rd[0]),
      .b_evt(m_evt[1]), .b_evt_empty(m_evt_empty[1]), .b_evt_rd(m_evt_rd[1]),
      .b_data(m_data[1]), .b_data_empty(m_data_empty[1]), .b_data_rd(m_data_rd[1]),
      .out_evt, .out_evt_empty, .out_evt_rd, .out_data, .out_data_empty, .out_data_rd,
      .out_evt_usedw(final_evt_usedw), .out_full(m_full[2]), .bxid_err(m_err[2])
    );
    assign inter_evt_usedw = m_usedw[0];
    assign fifo_full = m_full[0] || m_full[1] || m_full[2];
    assign bxid_err  = m_err[0] || m_err[1] || m_err[2];
  end

  initial assert (NASIC == 2 || NASIC == 4) else $error("lane_builder: NASIC must be 2 or 4");
endmodule
