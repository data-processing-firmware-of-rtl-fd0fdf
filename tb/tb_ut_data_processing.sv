// tb_ut_data_processing: end-to-end test of one Data Processing half at its
// default parameters (4x3 flavour, full buffer depths).
//
// Random bunch crossings are turned into SALT packets for all 24 ASICs and
// fed to the six streams, one word per ASIC every fifth framework cycle (the
// 40 MHz data rate on the 200 MHz interface). Every output packet is
// compared line by line, and its metadata, with the reference model in
// tb_ref_pkg. The test runs in phases:
//   1. normal traffic with flag, short-special and NZS events mixed in, one
//      ASIC disabled through the ECS and one BXID mismatch injected;
//   2. the PCIe side stops reading: buffers fill stage by stage
//      (back-pressure) until the Input Blocks enter truncation mode (eps_h
//      lowered through the ECS); truncated ASIC events are recognised from
//      the Flag Header and the expectation adjusted for them;
//   3. reading resumes, everything drains, truncation ends (hysteresis).
// Afterwards a software snapshot is requested and the event counters read
// back over the ECS bus and compared with what the checker saw. Each
// mechanism is counted and one that never happened counts as a failure.
module tb_ut_data_processing;
  import dp_pkg::*, tb_salt_pkg::*, tb_ref_pkg::*;

  localparam int ELINKS = 3, NASIC = 4, W = 8 * ELINKS;
  localparam int NBX = 700;

  logic clk_in = 0, clk_dp = 0, clk_pcie = 0, clk_ecs = 0;
  logic rst_in_n = 1, rst_dp_n = 1, rst_pcie_n = 1, rst_ecs_n = 1;
  initial begin rst_in_n = 0; rst_dp_n = 0; rst_pcie_n = 0; rst_ecs_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #5  clk_in   = ~clk_in;
  always #4  clk_dp   = ~clk_dp;
  initial begin #1; forever #4 clk_pcie = ~clk_pcie; end
  always #25 clk_ecs  = ~clk_ecs;

  logic [W-1:0] din       [NLANES][NASIC];
  logic         din_valid [NLANES][NASIC];
  logic         tfc_snapshot = 0;
  logic [255:0] pkt_data;
  logic         pkt_empty, pkt_rd, meta_empty, meta_rd;
  out_meta_t    pkt_meta;
  logic [7:0]   ecs_addr = 0;
  logic         ecs_wr = 0, ecs_rd = 0, ecs_rvalid;
  logic [31:0]  ecs_wdata = 0, ecs_rdata;
  logic [NLANES-1:0] trunc_active;

  ut_data_processing dut (
    .clk_in, .rst_in_n, .din, .din_valid, .clk_dp, .rst_dp_n, .tfc_snapshot,
    .clk_pcie, .rst_pcie_n, .pkt_data, .pkt_empty, .pkt_rd, .pkt_meta, .meta_empty, .meta_rd,
    .clk_ecs, .rst_ecs_n, .ecs_addr, .ecs_wr, .ecs_wdata, .ecs_rd, .ecs_rdata, .ecs_rvalid,
    .trunc_active
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_normal = 0, n_flag = 0, n_short = 0, n_nzs = 0, n_trunc_evt = 0, n_trunc_on = 0,
      n_bp_ob = 0, n_bp_lb = 0, n_bxerr_inj = 0, n_disabled_fed = 0, n_snap = 0;

  logic [23:0] en_mask = 24'hFFFFFF & ~(24'h1 << (4*5 + 3));  // lane 5 ASIC 3 off
  Event        sent[$];
  logic [39:0] wq [NLANES][NASIC][$];
  bit          drain = 1;
  bit          gen_done = 0;

  task automatic ecs_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk_ecs); ecs_addr = a; ecs_wdata = d; ecs_wr = 1;
    @(negedge clk_ecs); ecs_wr = 0;
  endtask
  task automatic ecs_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk_ecs); ecs_addr = a; ecs_rd = 1;
    @(negedge clk_ecs); ecs_rd = 0; d = ecs_rdata;
  endtask

  // ------------------------------------------------------------ stimulus
  function automatic Event make_event(int bx, int phase);
    Event e;
    int mode;
    logic [5:0] sc;
    e = new();
    mode = $urandom % 100;   // event-wide choice
    sc = ($urandom % 2) ? CODE_BXVETO : CODE_HEADERONLY;
    for (int l = 0; l < NLANES; l++)
      for (int a = 0; a < NASIC; a++) begin
        AsicPkt p;
        p = new();
        p.bxid = 12'(bx);
        p.trunc = 0;
        p.code = 0;
        if (mode < 4) begin                       // detector-wide special: short special
          p.kind = K_SPECIAL; p.code = sc;
        end else if (mode < 6 && phase == 1) begin   // NZS acquisition on all ASICs
          p.kind = K_NZS;
        end else if (mode < 14 && $urandom % 6 == 0) begin   // isolated specials: flag header
          p.kind = K_SPECIAL; p.code = 6'($urandom % 4) + 6'd1;
        end else begin
          int nh;
          nh = (phase == 2) ? int'($urandom % 6) : int'($urandom % 4);
          if ($urandom % 50 == 0) nh = 15 + int'($urandom % 20);
          p.kind = K_NORMAL;
          for (int h = 0; h < nh; h++) p.hits.push_back(rand_hit());
        end
        e.p[l][a] = p;
      end
    return e;
  endfunction

  initial begin
    for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
      din[l][a] = '0; din_valid[l][a] = 0;
    end
    pkt_rd = 0; meta_rd = 0;
    repeat (4) @(posedge clk_ecs);
    rst_in_n = 1; rst_dp_n = 1; rst_pcie_n = 1; rst_ecs_n = 1;
    repeat (2) @(posedge clk_ecs);
    ecs_write(8'h01, 32'(en_mask));
    ecs_write(8'h02, 32'd40);   // eps_h
    ecs_write(8'h03, 32'd8);    // eps_l
    repeat (4) @(posedge clk_ecs);
    for (int bx = 0; bx < NBX; bx++) begin
      int phase;
      Event e;
      phase = (bx < 300) ? 1 : (bx < 550 ? 2 : 3);
      e = make_event(bx, phase);
      if (bx == 37) begin e.p[2][1].bxid = 12'hABC; n_bxerr_inj++; end
      sent.push_back(e);
      for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
        logic [39:0] ws[$];
        make_packet(W, e.p[l][a].bxid, e.p[l][a].kind, e.p[l][a].code, e.p[l][a].hits, ws);
        foreach (ws[k]) wq[l][a].push_back(ws[k]);
        if (e.p[l][a].kind == K_NZS && en_mask[4*l+a]) n_nzs++;
      end
      // feed until the next crossing's packets are due: each ASIC link needs
      // about as many crossings as its packet has words
      for (int t = 0; t < 5 * 3; t++) begin
        @(negedge clk_in);
        for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
          din_valid[l][a] = 0;
          if (t % 5 == 0 && wq[l][a].size() != 0) begin
            din[l][a] = wq[l][a].pop_front()[W-1:0];
            din_valid[l][a] = 1;
            if (!en_mask[4*l+a]) n_disabled_fed++;
          end
        end
      end
      if (bx == 300) drain = 0;
      if (bx == 550) drain = 1;
    end
    // flush the remaining words
    for (int t = 0; t < 5 * 2000; t++) begin
      bit any;
      any = 0;
      @(negedge clk_in);
      for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
        din_valid[l][a] = 0;
        if (t % 5 == 0 && wq[l][a].size() != 0) begin
          din[l][a] = wq[l][a].pop_front()[W-1:0];
          din_valid[l][a] = 1;
        end
        if (wq[l][a].size() != 0) any = 1;
      end
      if (!any) break;
    end
    @(negedge clk_in);
    for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) din_valid[l][a] = 0;
    gen_done = 1;
  end

  // ------------------------------------------------------------ checker
  int n_pkts = 0;
  initial begin
    wait (rst_pcie_n);
    forever begin
      out_meta_t m;
      logic [255:0] got[$];
      logic [255:0] exp_lines[$];
      out_meta_t exp_m;
      Event e;
      @(posedge clk_pcie);
      if (!drain || meta_empty) continue;
      m = pkt_meta;
      #0;
      @(negedge clk_pcie); meta_rd = 1; @(negedge clk_pcie); meta_rd = 0;
      got = {};
      while (got.size() < int'(m.nlines)) begin
        @(posedge clk_pcie);
        if (!pkt_empty) begin
          got.push_back(pkt_data);
          @(negedge clk_pcie); pkt_rd = 1; @(negedge clk_pcie); pkt_rd = 0;
        end
      end
      n_pkts++;
      if (sent.size() == 0) begin
        failures++; $display("packet with no event sent"); continue;
      end
      e = sent.pop_front();
      // recognise truncated ASIC events from the packet itself
      if (m.ftype == FTYPE_FLAG && got.size() >= 4) begin
        for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
          logic [7:0] h;
          h = got[1 + l/2][192 + 32*(l%2) + 8*a +: 8];
          if (h == {2'b01, CODE_TRUNC} && en_mask[4*l+a]) begin
            e.p[l][a].trunc = 1; n_trunc_evt++;
          end
        end
      end else if (m.ftype == FTYPE_SHORT && m.flags[1:0] == 2'b11) begin
        for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++)
          if (en_mask[4*l+a]) begin e.p[l][a].trunc = 1; n_trunc_evt++; end
      end
      expect_packet(e, en_mask, NASIC, exp_lines, exp_m);
      checks++;
      if (m != exp_m) begin
        failures++;
        $display("pkt %0d: meta got %h exp %h", n_pkts, m, exp_m);
      end
      for (int i = 0; i < exp_lines.size() && i < got.size(); i++) begin
        checks++;
        if (got[i] != exp_lines[i]) begin
          failures++;
          if (failures < 10) $display("pkt %0d line %0d:\n got %h\n exp %h", n_pkts, i, got[i], exp_lines[i]);
        end
      end
      case (m.ftype)
        FTYPE_NORMAL: n_normal++;
        FTYPE_FLAG:   n_flag++;
        FTYPE_SHORT:  n_short++;
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ observers
  logic [NLANES-1:0] trunc_q = '0;
  always @(posedge clk_in) begin
    for (int l = 0; l < NLANES; l++) if (trunc_active[l] && !trunc_q[l]) n_trunc_on++;
    trunc_q <= trunc_active;
  end
  always @(posedge clk_dp) begin
    if (dut.u_ob.fifo_full) n_bp_ob++;
    if (dut.g_lane[0].u_lb.fifo_full) n_bp_lb++;
  end

  // ------------------------------------------------------------ end
  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    logic [31:0] v;
    wait (gen_done);
    wait (sent.size() == 0);
    repeat (50) @(posedge clk_ecs);
    ecs_write(8'h00, 32'h1);    // software snapshot
    repeat (20) @(posedge clk_ecs);
    ecs_read(8'h00, v); n_snap = int'(v);
    ecs_read(8'h10, v); checks++;
    if (v != 32'(n_normal)) begin failures++; $display("ECS normal count %0d exp %0d", v, n_normal); end
    ecs_read(8'h11, v); checks++;
    if (v != 32'(n_flag)) begin failures++; $display("ECS flag count %0d exp %0d", v, n_flag); end
    ecs_read(8'h12, v); checks++;
    if (v != 32'(n_short)) begin failures++; $display("ECS short count %0d exp %0d", v, n_short); end
    ecs_read(8'h14, v); checks++;
    if (v == 0) begin failures++; $display("ECS saw no BXID error"); end
    ecs_read(8'h20 + 8'd2*8'(2*NLANES), v); checks++;   // OB line FIFO peak
    if (v < 32'd400) begin failures++; $display("OB peak occupancy %0d too low", v); end
    checks++;
    if (trunc_active != 0) begin failures++; $display("truncation mode did not end: %b", trunc_active); end
    $display("mechanisms:");
    need("normal packets (0x42)", n_normal);
    need("flag-header packets (0x43)", n_flag);
    need("short-special packets (0x44)", n_short);
    need("NZS packets consumed", n_nzs);
    need("back-pressure at OB (cycles)", n_bp_ob);
    need("back-pressure at LB0 (cycles)", n_bp_lb);
    need("truncation mode entered", n_trunc_on);
    need("truncated ASIC events", n_trunc_evt);
    need("BXID mismatch injected", n_bxerr_inj);
    need("disabled-ASIC words ignored", n_disabled_fed);
    need("snapshots taken", n_snap);
    $display("packets checked: %0d", n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_dp);
    $display("watchdog expired: %0d events outstanding", sent.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
