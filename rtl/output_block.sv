// output_block: assembles the six lane event streams into 256-bit PCIe lines.
//
// Line layout (bit 255 on the left): a 64-bit header column, then lanes
// 5..0 with 32 bits (two hits) each, lane 0 in bits [31:0]. Within a lane the
// first hit of a pair is the lower 16 bits. Line 0 carries the Event Header
// {BXID[63:52], FLAGS[51:48], hit counts of lanes 5..0 in bytes 5..0}; the
// following lines carry hits only. A lane that runs out of hits is padded
// with zeros (LanePadding), and the packet is as long as its busiest lane,
// at least one line.
//
// Packet types (FTYPE, in the metadata):
//  0x42  normal: no enabled ASIC sent a special packet;
//  0x44  short special: every enabled ASIC sent the same special code (not
//        NZS); only the Event Header line is sent, FLAGS[2] ("all active
//        equal") set and FLAGS[1:0] giving the type summary of the code;
//  0x43  flag: any other case with a special packet. The header column of
//        lines 1..3 then holds the Flag Header, the 8-bit headers of all
//        ASICs: {lane1, lane0}, {lane3, lane2}, {lane5, lane4}, each lane's
//        32 bits holding ASIC 3..0 from the left. Such a packet has at least
//        four lines.
// FLAGS[3] ("all ASICs disabled") is kept in the format but is always 0
// here, since an event is only formed from data that arrived.
//
// Control: when every lane with an enabled ASIC offers an event descriptor
// and the metadata buffer has room, the descriptors are taken and the packet
// parameters computed. One line is then written per cycle, as long as every
// lane that still has hits has a data word ready (DumpFIFO: one 64-bit word
// serves two lines) and the line buffer has room. The metadata
// {BXID, FTYPE, length in lines, FLAGS} is written together with the first
// line, so a reader may start on a packet longer than the line buffer. Both
// buffers are dual-clock FIFOs read in the PCIe clock (show-ahead).
module output_block
  import dp_pkg::*;
#(
  parameter int NASIC      = 4,
  parameter int LINE_DEPTH = 512,
  parameter int META_DEPTH = 64
) (
  input  logic       clk,            // processing clock
  input  logic       rst_n,
  input  logic [4*NLANES-1:0] asic_en, // lane l uses bits [4l+NASIC-1:4l]
  input  evt_meta_t  lane_evt       [NLANES],
  input  logic       lane_evt_empty [NLANES],
  output logic       lane_evt_rd    [NLANES],
  input  hword_t     lane_data      [NLANES],
  input  logic       lane_data_empty[NLANES],
  output logic       lane_data_rd   [NLANES],
  // PCIe side
  input  logic       clk_pcie,
  input  logic       rst_pcie_n,
  output logic [LINE_W-1:0] pkt_data,
  output logic       pkt_empty,
  input  logic       pkt_rd,
  output out_meta_t  pkt_meta,
  output logic       meta_empty,
  input  logic       meta_rd,
  // monitoring
  output logic [$clog2(LINE_DEPTH):0] line_usedw,
  output logic       fifo_full,
  output logic       ev_done,        // pulse per packet written
  output logic [7:0] ev_ftype,
  output logic       ev_trunc,       // pulse: the packet holds a truncated ASIC event
  output logic       bxid_err        // lanes disagreed on the BXID
);
  typedef enum logic {S_IDLE, S_EMIT} state_t;
  state_t state;

  logic l_full, m_full;
  logic [$clog2(META_DEPTH):0] m_usedw;

  // lanes taking part
  logic [NLANES-1:0] lane_act;
  for (genvar l = 0; l < NLANES; l++) begin : g_act
    assign lane_act[l] = |asic_en[4*l +: NASIC];
  end

  // ---------------------------------------------------------------- control
  logic ready_all;
  always_comb begin
    ready_all = |lane_act;
    for (int l = 0; l < NLANES; l++)
      if (lane_act[l] && lane_evt_empty[l]) ready_all = 1'b0;
  end

  logic start;
  assign start = (state == S_IDLE) && ready_all && !m_full;

  // packet parameters from the offered descriptors
  logic        any_special, all_equal, seen, mism, any_trunc;
  logic [5:0]  first_code;
  logic [11:0] bx;
  logic [7:0]  nh   [NLANES];
  logic [7:0]  lines_c;
  logic [7:0]  ftype_c;
  logic [3:0]  flags_c;
  always_comb begin
    any_trunc = 1'b0; any_special = 1'b0; all_equal = 1'b1; seen = 1'b0; first_code = '0;
    bx = '0; mism = 1'b0; lines_c = 8'd1;
    for (int l = 0; l < NLANES; l++) begin
      nh[l] = lane_act[l] ? lane_evt[l].nhits : 8'd0;
      if (lane_act[l]) begin
        if (!seen) bx = lane_evt[l].bxid;
        else if (lane_evt[l].bxid != bx) mism = 1'b1;
        for (int k = 0; k < NASIC; k++) begin
          if (asic_en[4*l+k]) begin
            if (lane_evt[l].heads[8*k+6]) any_special = 1'b1;
            else all_equal = 1'b0;
            if (lane_evt[l].heads[8*k +: 8] == {2'b01, CODE_TRUNC}) any_trunc = 1'b1;
            if (!seen) first_code = lane_evt[l].heads[8*k +: 6];
            else if (lane_evt[l].heads[8*k +: 6] != first_code) all_equal = 1'b0;
            seen = 1'b1;
          end
        end
      end
      if ((nh[l] + 8'd1) >> 1 > lines_c) lines_c = (nh[l] + 8'd1) >> 1;
    end
    if (!seen || first_code == CODE_NZS) all_equal = 1'b0;
    flags_c = {1'b0, all_equal, all_equal ? type_summary(first_code) : 2'b00};
    if (all_equal) begin
      ftype_c = FTYPE_SHORT;
      lines_c = 8'd1;
    end else if (any_special) begin
      ftype_c = FTYPE_FLAG;
      if (lines_c < 8'd4) lines_c = 8'd4;
    end else ftype_c = FTYPE_NORMAL;
  end

  // latched packet
  logic [7:0]  p_nh [NLANES];
  logic [7:0]  p_lines, p_ftype, line;
  logic [3:0]  p_flags;
  logic        p_trunc;
  logic [11:0] p_bx;
  logic [63:0] p_flagw [3];

  // ---------------------------------------------------------------- emit
  logic [NLANES-1:0] need, pop_l;
  logic data_ok, emit, last;
  always_comb begin
    data_ok = 1'b1;
    for (int l = 0; l < NLANES; l++) begin
      need[l]  = ({line, 1'b0} < {1'b0, p_nh[l]});
      pop_l[l] = need[l] && (line[0] || ({line, 1'b0} + 9'd2 >= {1'b0, p_nh[l]}));
      if (need[l] && lane_data_empty[l]) data_ok = 1'b0;
    end
  end
  assign emit = (state == S_EMIT) && data_ok && !l_full;
  assign last = (line + 8'd1 == p_lines);

  logic [LINE_W-1:0] l_wdata;
  always_comb begin
    l_wdata = '0;
    if (line == 8'd0)
      l_wdata[255:192] = {p_bx, p_flags, p_nh[5], p_nh[4], p_nh[3], p_nh[2], p_nh[1], p_nh[0]};
    else if (p_ftype == FTYPE_FLAG && line <= 8'd3)
      l_wdata[255:192] = p_flagw[2'(line - 8'd1)];
    for (int l = 0; l < NLANES; l++)
      if (need[l]) l_wdata[32*l +: 32] = lane_data[l].hits[32*line[0] +: 32];
  end

  for (genvar l = 0; l < NLANES; l++) begin : g_rd
    assign lane_evt_rd[l]  = start && lane_act[l];
    assign lane_data_rd[l] = emit && pop_l[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; line <= '0; p_lines <= '0; p_ftype <= '0; p_flags <= '0; p_bx <= '0; p_trunc <= 1'b0;
      for (int l = 0; l < NLANES; l++) p_nh[l] <= '0;
      for (int j = 0; j < 3; j++) p_flagw[j] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_EMIT;
          line    <= '0;
          p_lines <= lines_c;
          p_ftype <= ftype_c;
          p_flags <= flags_c;
          p_bx    <= bx;
          p_trunc <= any_trunc;
          for (int l = 0; l < NLANES; l++)
            p_nh[l] <= (ftype_c == FTYPE_SHORT) ? 8'd0 : nh[l];
          for (int j = 0; j < 3; j++)
            p_flagw[j] <= {lane_act[2*j+1] ? lane_evt[2*j+1].heads : 32'd0,
                           lane_act[2*j]   ? lane_evt[2*j].heads   : 32'd0};
        end
        S_EMIT: if (emit) begin
          line <= line + 8'd1;
          if (last) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  out_meta_t m_wdata;
  assign m_wdata = '{bxid: p_bx, ftype: p_ftype, nlines: p_lines, flags: p_flags};

  async_fifo #(.WIDTH(LINE_W), .DEPTH(LINE_DEPTH)) u_lines (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(emit), .wr_data(l_wdata),
    .wr_full(l_full), .wr_usedw(line_usedw),
    .rd_clk(clk_pcie), .rd_rst_n(rst_pcie_n), .rd_en(pkt_rd), .rd_data(pkt_data),
    .rd_empty(pkt_empty), .rd_usedw()
  );
  async_fifo #(.WIDTH($bits(out_meta_t)), .DEPTH(META_DEPTH)) u_meta (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(emit && line == 8'd0), .wr_data(m_wdata),
    .wr_full(m_full), .wr_usedw(m_usedw),
    .rd_clk(clk_pcie), .rd_rst_n(rst_pcie_n), .rd_en(meta_rd), .rd_data(pkt_meta),
    .rd_empty(meta_empty), .rd_usedw()
  );

  assign fifo_full = l_full || m_full;
  assign ev_done   = emit && last;
  assign ev_ftype  = p_ftype;
  assign ev_trunc  = emit && last && p_trunc;
  assign bxid_err  = start && mism;

  // a packet is never shorter than its header (and flag header) lines
  a_min_length: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (lines_c != 0 && (ftype_c != FTYPE_FLAG || lines_c >= 8'd4)));
endmodule
