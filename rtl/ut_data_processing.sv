// ut_data_processing: one half of the UT Data Processing block.
//
// Six framework streams, each carrying NASIC SALT ASICs with ELINKS e-links
// (flavour 4x3: ELINKS=3, NASIC=4; 2x3, 2x4, 2x5: NASIC=2), enter six Input
// Blocks. Lane l is fed by Input Block l, so a lane holds the ASICs of one
// link. Six Lane Builders merge the ASICs of each lane, and the Output Block
// packs the six lanes into 256-bit PCIe lines plus one metadata word per
// packet. An ECS common block holds the configuration, counts events and
// errors, and takes snapshots of counters and FIFO occupancies.
//
// Four clocks: clk_in (framework input, 200 MHz in the published system),
// clk_dp (processing, about 250 MHz), clk_pcie (PCIe side, 250 MHz) and
// clk_ecs (40 MHz). Crossings are dual-clock FIFOs for data and handshakes or
// two-flop synchronizers for control; configuration is quasi-static.
// Every stage only takes an event when its output has room, so a slow PCIe
// side back-pressures level by level until the Input Block FIFOs fill, at
// which point truncation mode (eps_h / eps_l hysteresis) drops hits and
// flags the events instead of losing synchronisation.
//
// Buffer depths default to the occupancy counter widths visible in the
// published back-pressure simulation (Event FIFOs of 512 entries in the
// Input Block and 64 in the Lane Builders); the other depths are this
// design's choice.
module ut_data_processing
  import dp_pkg::*;
#(
  parameter int ELINKS        = 3,
  parameter int NASIC         = 4,
  parameter int IB_DATA_DEPTH = 512,
  parameter int IB_EVT_DEPTH  = 512,
  parameter int LB_DATA_DEPTH = 256,
  parameter int LB_EVT_DEPTH  = 64,
  parameter int OB_LINE_DEPTH = 512,
  parameter int OB_META_DEPTH = 64
) (
  // framework input streams
  input  logic                clk_in,
  input  logic                rst_in_n,
  input  logic [8*ELINKS-1:0] din       [NLANES][NASIC],
  input  logic                din_valid [NLANES][NASIC],
  // processing clock
  input  logic                clk_dp,
  input  logic                rst_dp_n,
  input  logic                tfc_snapshot,     // clk_dp pulse
  // PCIe side
  input  logic                clk_pcie,
  input  logic                rst_pcie_n,
  output logic [LINE_W-1:0]   pkt_data,
  output logic                pkt_empty,
  input  logic                pkt_rd,
  output out_meta_t           pkt_meta,
  output logic                meta_empty,
  input  logic                meta_rd,
  // ECS bus
  input  logic                clk_ecs,
  input  logic                rst_ecs_n,
  input  logic [7:0]          ecs_addr,
  input  logic                ecs_wr,
  input  logic [31:0]         ecs_wdata,
  input  logic                ecs_rd,
  output logic [31:0]         ecs_rdata,
  output logic                ecs_rvalid,
  // observation
  output logic [NLANES-1:0]   trunc_active      // clk_in domain
);
  localparam int MW   = $clog2(IB_DATA_DEPTH) + 1;
  localparam int NMON = 2 * NLANES + 1;

  // configuration from the ECS block
  logic [4*NLANES-1:0] cfg_asic_en;
  logic [MW-1:0]       cfg_eps_h, cfg_eps_l;
  logic [3:0]          cfg_strip_off [4*NLANES];

  logic [4*NLANES-1:0] en_dp1, en_dp2;
  always_ff @(posedge clk_dp or negedge rst_dp_n) begin
    if (!rst_dp_n) begin en_dp1 <= '0; en_dp2 <= '0; end
    else begin en_dp1 <= cfg_asic_en; en_dp2 <= en_dp1; end
  end

  // lane interfaces
  evt_meta_t lane_evt  [NLANES];
  hword_t    lane_data [NLANES];
  logic lane_evt_empty[NLANES], lane_evt_rd[NLANES], lane_data_empty[NLANES], lane_data_rd[NLANES];

  logic [MW-1:0] occ_peak [NMON];
  logic [MW-1:0] occ_avg  [NMON];
  logic [MW-1:0] occ      [NMON];
  logic [NLANES-1:0] ib_full, lb_full, lb_err;

  for (genvar l = 0; l < NLANES; l++) begin : g_lane
    asic_evt_t ib_evt  [NASIC];
    hword_t    ib_data [NASIC];
    logic ib_evt_empty[NASIC], ib_evt_rd[NASIC], ib_data_empty[NASIC], ib_data_rd[NASIC];
    logic [3:0] offs [NASIC];
    logic [$clog2(IB_EVT_DEPTH):0] ib_evt_usedw;
    logic [$clog2(LB_EVT_DEPTH):0] lb_final_usedw, lb_inter_usedw;
    logic ib_trunc_evt;

    for (genvar a = 0; a < NASIC; a++) begin : g_off
      assign offs[a] = cfg_strip_off[4*l + a];
    end

    input_block #(.ELINKS(ELINKS), .NASIC(NASIC), .DATA_DEPTH(IB_DATA_DEPTH),
                  .EVT_DEPTH(IB_EVT_DEPTH)) u_ib (
      .clk_in, .rst_in_n, .din(din[l]), .din_valid(din_valid[l]),
      .asic_en(cfg_asic_en[4*l +: NASIC]), .strip_off(offs),
      .eps_h(cfg_eps_h), .eps_l(cfg_eps_l),
      .clk_dp, .rst_dp_n,
      .data_rd(ib_data_rd), .data_out(ib_data), .data_empty(ib_data_empty),
      .evt_rd(ib_evt_rd), .evt_out(ib_evt), .evt_empty(ib_evt_empty),
      .evt_usedw(ib_evt_usedw), .trunc_mode(trunc_active[l]),
      .trunc_event(ib_trunc_evt), .fifo_full(ib_full[l])
    );

    lane_builder #(.NASIC(NASIC), .DATA_DEPTH(LB_DATA_DEPTH), .EVT_DEPTH(LB_EVT_DEPTH)) u_lb (
      .clk(clk_dp), .rst_n(rst_dp_n), .asic_en(en_dp2[4*l +: NASIC]),
      .in_evt(ib_evt), .in_evt_empty(ib_evt_empty), .in_evt_rd(ib_evt_rd),
      .in_data(ib_data), .in_data_empty(ib_data_empty), .in_data_rd(ib_data_rd),
      .out_evt(lane_evt[l]), .out_evt_empty(lane_evt_empty[l]), .out_evt_rd(lane_evt_rd[l]),
      .out_data(lane_data[l]), .out_data_empty(lane_data_empty[l]), .out_data_rd(lane_data_rd[l]),
      .final_evt_usedw(lb_final_usedw), .inter_evt_usedw(lb_inter_usedw),
      .fifo_full(lb_full[l]), .bxid_err(lb_err[l])
    );

    assign occ[l]          = MW'(ib_evt_usedw);
    assign occ[NLANES + l] = MW'(lb_final_usedw);
  end

  logic [$clog2(OB_LINE_DEPTH):0] ob_usedw;
  logic ob_full, ob_err, ev_done, ev_trunc;
  logic [7:0] ev_ftype;

  output_block #(.NASIC(NASIC), .LINE_DEPTH(OB_LINE_DEPTH), .META_DEPTH(OB_META_DEPTH)) u_ob (
    .clk(clk_dp), .rst_n(rst_dp_n), .asic_en(en_dp2),
    .lane_evt, .lane_evt_empty, .lane_evt_rd, .lane_data, .lane_data_empty, .lane_data_rd,
    .clk_pcie, .rst_pcie_n, .pkt_data, .pkt_empty, .pkt_rd, .pkt_meta, .meta_empty, .meta_rd,
    .line_usedw(ob_usedw), .fifo_full(ob_full), .ev_done, .ev_ftype, .ev_trunc,
    .bxid_err(ob_err)
  );
  assign occ[2*NLANES] = MW'(ob_usedw);

  for (genvar m = 0; m < NMON; m++) begin : g_mon
    occupancy_monitor #(.W(MW)) u_mon (
      .clk(clk_dp), .rst_n(rst_dp_n), .usedw(occ[m]), .clear(1'b0),
      .peak(occ_peak[m]), .avg(occ_avg[m])
    );
  end

  // Input Block full flags into the processing clock
  logic [NLANES-1:0] ibf_s1, ibf_s2;
  always_ff @(posedge clk_dp or negedge rst_dp_n) begin
    if (!rst_dp_n) begin ibf_s1 <= '0; ibf_s2 <= '0; end
    else begin ibf_s1 <= ib_full; ibf_s2 <= ibf_s1; end
  end

  logic snap_taken;
  ecs_common #(.NMON(NMON), .MW(MW)) u_ecs (
    .clk_ecs, .rst_ecs_n, .ecs_addr, .ecs_wr, .ecs_wdata, .ecs_rd, .ecs_rdata, .ecs_rvalid,
    .cfg_asic_en, .cfg_eps_h, .cfg_eps_l, .cfg_strip_off,
    .clk_dp, .rst_dp_n, .ev_done, .ev_ftype, .ev_trunc,
    .bxid_err(|lb_err || ob_err), .fifo_full(|ibf_s2 || |lb_full || ob_full),
    .tfc_snapshot, .occ_peak, .occ_avg, .snap_taken
  );
endmodule
