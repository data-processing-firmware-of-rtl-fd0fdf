// tb_workload_4x3: the busiest three-e-link detector region, run through one
// Data Processing half at its default parameters (4x3 flavour).
//
// Traffic model: every 40 MHz bunch crossing, each lane gets a hit count
// drawn from a geometric distribution with a mean of 1.74 hits, the mean
// expected for the worst three-e-link region; the hits are spread at random
// over the lane's four ASICs. All packets are normal zero-suppressed
// packets. Each ASIC stream delivers one 24-bit word every fifth 200 MHz
// cycle, which is the full data rate of three e-links, so the links, not the
// design, set the pace. The PCIe side reads one line and one descriptor
// per cycle whenever they are available.
//
// Checks: every packet and descriptor against the reference model; no
// truncation and no full buffer anywhere during the run; the Output Block
// line buffer stays nearly empty and the last packet leaves within 2 us of
// the last input word, i.e. the chain keeps up with the links. At a mean of
// 1.74 hits per lane a link needs about 25 bits per crossing against the 24
// it carries, so the links of different ASICs drift apart; the Input Block
// and Lane Builder event FIFOs absorb that skew and their peaks are only
// printed. Mean hits per lane and lines per crossing are printed for
// comparison with the expected 1.74 and 2.8.
module tb_workload_4x3;
  import dp_pkg::*, tb_salt_pkg::*, tb_ref_pkg::*;

  localparam int ELINKS = 3, NASIC = 4, W = 8 * ELINKS;
  localparam int NBX = 2000;

  logic clk_in = 0, clk_dp = 0, clk_pcie = 0, clk_ecs = 0;
  logic rst_in_n = 1, rst_dp_n = 1, rst_pcie_n = 1, rst_ecs_n = 1;
  initial begin rst_in_n = 0; rst_dp_n = 0; rst_pcie_n = 0; rst_ecs_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #5  clk_in   = ~clk_in;     // 200 MHz
  always #2  clk_dp   = ~clk_dp;     // 250 MHz
  initial begin #1; forever #2 clk_pcie = ~clk_pcie; end
  always #25 clk_ecs  = ~clk_ecs;

  logic [W-1:0] din       [NLANES][NASIC];
  logic         din_valid [NLANES][NASIC];
  logic         tfc_snapshot = 0;
  logic [255:0] pkt_data;
  logic         pkt_empty, meta_empty;
  logic         pkt_rd = 0, meta_rd = 0;
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
  int n_pkts = 0, n_lines = 0, n_hits = 0, n_full = 0, n_trunc = 0, max_ib_evt = 0, max_lb = 0, max_ob = 0;
  logic [23:0] en_mask = 24'hFFFFFF;
  Event        sent[$];
  logic [39:0] wq [NLANES][NASIC][$];
  bit          gen_done = 0;
  time         t_last_in = 0, t_last_out = 0;

  // ------------------------------------------------------------ stimulus
  function automatic int geometric();   // P(n) = (1-q) q^n, mean q/(1-q) = 1.74
    int n;
    n = 0;
    while ($urandom % 1000 < 635 && n < 60) n++;
    return n;
  endfunction

  function automatic Event make_event(int bx);
    Event e;
    int nh [NLANES][NASIC];
    e = new();
    for (int l = 0; l < NLANES; l++) begin
      int n;
      for (int a = 0; a < NASIC; a++) nh[l][a] = 0;
      n = geometric();
      n_hits += n;
      for (int i = 0; i < n; i++) nh[l][$urandom % NASIC]++;
      for (int a = 0; a < NASIC; a++) begin
        AsicPkt p;
        p = new();
        p.bxid = 12'(bx); p.trunc = 0; p.code = 0; p.kind = K_NORMAL;
        for (int h = 0; h < nh[l][a]; h++) p.hits.push_back(rand_hit());
        e.p[l][a] = p;
      end
    end
    return e;
  endfunction

  initial begin
    for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
      din[l][a] = '0; din_valid[l][a] = 0;
    end
    repeat (4) @(posedge clk_ecs);
    rst_in_n = 1; rst_dp_n = 1; rst_pcie_n = 1; rst_ecs_n = 1;
    repeat (4) @(posedge clk_ecs);
    for (int bx = 0; bx < NBX; bx++) begin
      Event e;
      e = make_event(bx);
      sent.push_back(e);
      for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
        logic [39:0] ws[$];
        make_packet(W, e.p[l][a].bxid, e.p[l][a].kind, e.p[l][a].code, e.p[l][a].hits, ws);
        foreach (ws[k]) wq[l][a].push_back(ws[k]);
      end
      // one crossing = five framework cycles = one word per ASIC link
      for (int t = 0; t < 5; t++) begin
        @(negedge clk_in);
        for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
          din_valid[l][a] = 0;
          if (t == 0 && wq[l][a].size() != 0) begin
            din[l][a] = wq[l][a].pop_front()[W-1:0];
            din_valid[l][a] = 1;
          end
        end
      end
    end
    // the links finish sending what they have queued
    forever begin
      bit any;
      any = 0;
      for (int t = 0; t < 5; t++) begin
        @(negedge clk_in);
        for (int l = 0; l < NLANES; l++) for (int a = 0; a < NASIC; a++) begin
          din_valid[l][a] = 0;
          if (t == 0 && wq[l][a].size() != 0) begin
            din[l][a] = wq[l][a].pop_front()[W-1:0];
            din_valid[l][a] = 1;
            any = 1; t_last_in = $time;
          end
        end
      end
      if (!any) break;
    end
    gen_done = 1;
  end

  // ------------------------------------------------------------ reader and checker
  logic [255:0] lq[$];
  out_meta_t    mq[$];
  always @(negedge clk_pcie) begin
    pkt_rd  = rst_pcie_n && !pkt_empty;
    meta_rd = rst_pcie_n && !meta_empty;
  end
  always @(posedge clk_pcie) begin
    if (pkt_rd)  lq.push_back(pkt_data);
    if (meta_rd) mq.push_back(pkt_meta);
  end

  initial begin
    forever begin
      out_meta_t m, exp_m;
      logic [255:0] exp_lines[$];
      Event e;
      @(posedge clk_pcie);
      if (mq.size() == 0 || lq.size() < int'(mq[0].nlines)) continue;
      m = mq.pop_front();
      n_pkts++; n_lines += int'(m.nlines);
      t_last_out = $time;
      if (sent.size() == 0) begin failures++; $display("packet with no event sent"); continue; end
      e = sent.pop_front();
      expect_packet(e, en_mask, NASIC, exp_lines, exp_m);
      checks++;
      if (m != exp_m) begin failures++; $display("pkt %0d: meta got %h exp %h", n_pkts, m, exp_m); end
      for (int i = 0; i < int'(m.nlines); i++) begin
        logic [255:0] g;
        g = lq.pop_front();
        checks++;
        if (i >= exp_lines.size() || g != exp_lines[i]) begin
          failures++;
          if (failures < 10) $display("pkt %0d line %0d wrong", n_pkts, i);
        end
      end
    end
  end

  // ------------------------------------------------------------ observers
  always @(posedge clk_in) begin
    if (trunc_active != 0) n_trunc++;
  end
  always @(posedge clk_dp) begin
    if (dut.u_ecs.fifo_full) n_full++;
    if (int'(dut.occ[0]) > max_ib_evt) max_ib_evt = int'(dut.occ[0]);
    for (int l = 0; l < NLANES; l++) if (int'(dut.occ[NLANES + l]) > max_lb) max_lb = int'(dut.occ[NLANES + l]);
    if (int'(dut.occ[2*NLANES]) > max_ob) max_ob = int'(dut.occ[2*NLANES]);
  end

  initial begin
    wait (gen_done);
    wait (sent.size() == 0);
    repeat (20) @(posedge clk_pcie);
    checks += 4;
    if (n_trunc != 0) begin failures++; $display("truncation mode was entered (%0d cycles)", n_trunc); end
    if (n_full != 0) begin failures++; $display("a buffer was full for %0d cycles", n_full); end
    if (max_ob > 32) begin failures++; $display("Output Block line buffer reached %0d entries", max_ob); end
    if (t_last_out > t_last_in + 2000) begin
      failures++; $display("last packet %0t after the last input word", t_last_out - t_last_in);
    end
    $display("workload: %0d crossings, %0d packets, mean %0.2f hits/lane/crossing, mean %0.2f lines/crossing",
             NBX, n_pkts, real'(n_hits) / real'(NBX * NLANES), real'(n_lines) / real'(n_pkts));
    $display("largest occupancy: Input Block 0 Event FIFO %0d, Lane Builder event FIFOs %0d (both from link skew), Output Block lines %0d",
             max_ib_evt, max_lb, max_ob);
    $display("last packet %0d ns after the last input word", int'(t_last_out) - int'(t_last_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk_dp);
    $display("watchdog expired: %0d events outstanding", sent.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
