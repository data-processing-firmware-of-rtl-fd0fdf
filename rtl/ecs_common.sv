// ecs_common: the ECS common block of one Data Processing half.
//
// ECS side (40 MHz clock): a simple register bus (write decoder and read
// decoder; read data is registered, valid one cycle after ecs_rd).
//   0x00  W bit0: software snapshot request      R: number of snapshots taken
//   0x01  RW  ASIC enable mask, bit 4*lane+asic    (reset: all enabled)
//   0x02  RW  eps_h, truncation upper threshold    (reset: 384)
//   0x03  RW  eps_l, truncation lower threshold    (reset: 128)
//   0x04..0x06 RW strip offsets, 4 bits per ASIC, ASIC 8*(addr-4)+i in
//              bits [4i+3:4i]                      (reset: ASIC position in lane)
//   0x08  R   cause of the last snapshot {sw, tfc, error, full}
//   0x10..0x15 R snapshot of the event counters: normal, flag, short
//              special, truncated, BXID error, buffer-full occurrences
//   0x20+2m / 0x21+2m R snapshot of the peak / average occupancy of monitor m
// The configuration registers drive the data path directly and are meant
// to be changed only while it is idle (quasi-static); the receivers bring
// them into their clocks through two flip-flops.
//
// Processing side: 32-bit event-category and error counters run
// continuously. A snapshot freezes the counters and the occupancy monitors
// into a register set when a buffer becomes full, a BXID error is seen, a TFC
// snapshot command arrives or software asks for one. The frozen set is
// handed to the ECS clock with a toggle handshake (capture -> toggle ->
// two-flop sync -> copy -> acknowledge toggle); triggers that arrive while a
// transfer is under way are dropped. The register map, counter set and
// reset values are this design's own.
module ecs_common
  import dp_pkg::*;
#(
  parameter int NMON = 13,
  parameter int MW   = 10
) (
  // ECS bus
  input  logic        clk_ecs,
  input  logic        rst_ecs_n,
  input  logic [7:0]  ecs_addr,
  input  logic        ecs_wr,
  input  logic [31:0] ecs_wdata,
  input  logic        ecs_rd,
  output logic [31:0] ecs_rdata,
  output logic        ecs_rvalid,
  // configuration (ECS clock, quasi-static)
  output logic [4*NLANES-1:0] cfg_asic_en,
  output logic [MW-1:0]       cfg_eps_h,
  output logic [MW-1:0]       cfg_eps_l,
  output logic [3:0]          cfg_strip_off [4*NLANES],
  // processing side
  input  logic        clk_dp,
  input  logic        rst_dp_n,
  input  logic        ev_done,
  input  logic [7:0]  ev_ftype,
  input  logic        ev_trunc,
  input  logic        bxid_err,
  input  logic        fifo_full,
  input  logic        tfc_snapshot,
  input  logic [MW-1:0] occ_peak [NMON],
  input  logic [MW-1:0] occ_avg  [NMON],
  output logic        snap_taken      // clk_dp pulse, for observation
);
  localparam int NCNT = 6;

  // ------------------------------------------------------------ ECS domain
  logic        sw_req_t;
  logic [31:0] snap_cnt_ecs;
  logic [31:0] rd_cnt [NCNT];
  logic [3:0]  rd_cause;
  logic [MW-1:0] rd_peak [NMON];
  logic [MW-1:0] rd_avg  [NMON];
  logic [2:0]  done_s;      // sync of done toggle + previous
  logic        ack_t;

  always_ff @(posedge clk_ecs or negedge rst_ecs_n) begin
    if (!rst_ecs_n) begin
      sw_req_t    <= 1'b0;
      cfg_asic_en <= '1;
      cfg_eps_h   <= MW'(384);
      cfg_eps_l   <= MW'(128);
      for (int i = 0; i < 4*NLANES; i++) cfg_strip_off[i] <= 4'(i % 4);
    end else if (ecs_wr) begin
      case (ecs_addr)
        8'h00: if (ecs_wdata[0]) sw_req_t <= ~sw_req_t;
        8'h01: cfg_asic_en <= ecs_wdata[4*NLANES-1:0];
        8'h02: cfg_eps_h   <= ecs_wdata[MW-1:0];
        8'h03: cfg_eps_l   <= ecs_wdata[MW-1:0];
        8'h04, 8'h05, 8'h06:
          for (int i = 0; i < 8; i++)
            cfg_strip_off[8*(ecs_addr-8'h04)+i] <= ecs_wdata[4*i +: 4];
        default: ;
      endcase
    end
  end

  // snapshot hand-over into the ECS domain
  logic done_t;
  logic [31:0]   s_cnt [NCNT];
  logic [3:0]    s_cause;
  logic [MW-1:0] s_peak [NMON];
  logic [MW-1:0] s_avg  [NMON];

  always_ff @(posedge clk_ecs or negedge rst_ecs_n) begin
    if (!rst_ecs_n) begin
      done_s <= '0; ack_t <= 1'b0; snap_cnt_ecs <= '0; rd_cause <= '0;
      for (int i = 0; i < NCNT; i++) rd_cnt[i] <= '0;
      for (int m = 0; m < NMON; m++) begin rd_peak[m] <= '0; rd_avg[m] <= '0; end
    end else begin
      done_s <= {done_s[1:0], done_t};
      if (done_s[2] != done_s[1]) begin
        for (int i = 0; i < NCNT; i++) rd_cnt[i] <= s_cnt[i];
        for (int m = 0; m < NMON; m++) begin rd_peak[m] <= s_peak[m]; rd_avg[m] <= s_avg[m]; end
        rd_cause     <= s_cause;
        snap_cnt_ecs <= snap_cnt_ecs + 1;
        ack_t        <= ~ack_t;
      end
    end
  end

  // read decoder
  always_ff @(posedge clk_ecs or negedge rst_ecs_n) begin
    if (!rst_ecs_n) begin
      ecs_rdata <= '0; ecs_rvalid <= 1'b0;
    end else begin
      ecs_rvalid <= ecs_rd;
      ecs_rdata  <= '0;
      if (ecs_rd) begin
        if (ecs_addr == 8'h00) ecs_rdata <= snap_cnt_ecs;
        else if (ecs_addr == 8'h01) ecs_rdata <= 32'(cfg_asic_en);
        else if (ecs_addr == 8'h02) ecs_rdata <= 32'(cfg_eps_h);
        else if (ecs_addr == 8'h03) ecs_rdata <= 32'(cfg_eps_l);
        else if (ecs_addr >= 8'h04 && ecs_addr <= 8'h06) begin
          for (int i = 0; i < 8; i++)
            ecs_rdata[4*i +: 4] <= cfg_strip_off[8*(ecs_addr-8'h04)+i];
        end
        else if (ecs_addr == 8'h08) ecs_rdata <= 32'(rd_cause);
        else if (ecs_addr >= 8'h10 && ecs_addr < 8'h10 + 8'(NCNT)) ecs_rdata <= rd_cnt[ecs_addr - 8'h10];
        else if (ecs_addr >= 8'h20 && ecs_addr < 8'h20 + 8'(2*NMON)) begin
          if (ecs_addr[0]) ecs_rdata <= 32'(rd_avg [(ecs_addr - 8'h20) >> 1]);
          else             ecs_rdata <= 32'(rd_peak[(ecs_addr - 8'h20) >> 1]);
        end
      end
    end
  end

  // ------------------------------------------------------------ DP domain
  logic [31:0] cnt [NCNT];
  logic [2:0]  req_s, ack_s;
  logic        full_q, busy;
  logic        trig_full, trig_sw;
  logic [3:0]  cause;

  assign trig_full = fifo_full && !full_q;
  assign trig_sw   = req_s[2] != req_s[1];
  assign cause     = {trig_sw, tfc_snapshot, bxid_err, trig_full};
  assign snap_taken = (|cause) && !busy;

  logic [31:0] cnt_nx [NCNT];
  always_comb begin
    for (int i = 0; i < NCNT; i++) cnt_nx[i] = cnt[i];
    if (ev_done && ev_ftype == FTYPE_NORMAL) cnt_nx[0] = cnt[0] + 1;
    if (ev_done && ev_ftype == FTYPE_FLAG)   cnt_nx[1] = cnt[1] + 1;
    if (ev_done && ev_ftype == FTYPE_SHORT)  cnt_nx[2] = cnt[2] + 1;
    if (ev_trunc)  cnt_nx[3] = cnt[3] + 1;
    if (bxid_err)  cnt_nx[4] = cnt[4] + 1;
    if (trig_full) cnt_nx[5] = cnt[5] + 1;
  end

  always_ff @(posedge clk_dp or negedge rst_dp_n) begin
    if (!rst_dp_n) begin
      for (int i = 0; i < NCNT; i++) begin cnt[i] <= '0; s_cnt[i] <= '0; end
      for (int m = 0; m < NMON; m++) begin s_peak[m] <= '0; s_avg[m] <= '0; end
      req_s <= '0; ack_s <= '0; full_q <= 1'b0; busy <= 1'b0; done_t <= 1'b0; s_cause <= '0;
    end else begin
      req_s  <= {req_s[1:0], sw_req_t};
      ack_s  <= {ack_s[1:0], ack_t};
      full_q <= fifo_full;
      for (int i = 0; i < NCNT; i++) cnt[i] <= cnt_nx[i];
      if (snap_taken) begin
        for (int i = 0; i < NCNT; i++) s_cnt[i] <= cnt_nx[i];  // includes the triggering event
        for (int m = 0; m < NMON; m++) begin s_peak[m] <= occ_peak[m]; s_avg[m] <= occ_avg[m]; end
        s_cause <= cause;
        busy    <= 1'b1;
        done_t  <= ~done_t;
      end else if (busy && ack_s[2] != ack_s[1]) begin
        busy <= 1'b0;
      end
    end
  end
endmodule
