// tb_output_block: offers lane event streams (descriptors plus packed hit
// words, as the Lane Builders deliver them) to the Output Block and checks
// every PCIe line and metadata word against the reference model: Event
// Header, Flag Header placement, lane padding, FTYPE 0x42/0x43/0x44, FLAGS
// and packet length. Lane 4 is disabled entirely and one ASIC of lane 1 is
// disabled; the PCIe side reads with long pauses so that the line buffer
// fills and the block has to wait.
module tb_output_block;
  import dp_pkg::*, tb_salt_pkg::*, tb_ref_pkg::*;
  logic clk = 0, clk_pcie = 0, rst_n = 1;
  initial begin rst_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #4 clk = ~clk;
  initial begin #1; forever #5 clk_pcie = ~clk_pcie; end

  localparam logic [23:0] EN = 24'hFF0FFF & ~24'h000020;   // lane 4 off, lane 1 ASIC 1 off
  evt_meta_t lane_evt[NLANES];
  hword_t    lane_data[NLANES];
  logic lane_evt_empty[NLANES], lane_evt_rd[NLANES], lane_data_empty[NLANES], lane_data_rd[NLANES];
  logic [255:0] pkt_data;
  logic pkt_empty, pkt_rd = 0, meta_empty, meta_rd = 0;
  out_meta_t pkt_meta;
  logic [5:0] line_usedw;
  logic fifo_full, ev_done, ev_trunc, bxid_err;
  logic [7:0] ev_ftype;

  output_block #(.NASIC(4), .LINE_DEPTH(32), .META_DEPTH(8)) dut (
    .clk, .rst_n, .asic_en(EN), .lane_evt, .lane_evt_empty, .lane_evt_rd, .lane_data,
    .lane_data_empty, .lane_data_rd, .clk_pcie, .rst_pcie_n(rst_n), .pkt_data, .pkt_empty,
    .pkt_rd, .pkt_meta, .meta_empty, .meta_rd, .line_usedw, .fifo_full, .ev_done, .ev_ftype,
    .ev_trunc, .bxid_err);

  evt_meta_t qe[NLANES][$];
  hword_t    qd[NLANES][$];
  for (genvar l = 0; l < NLANES; l++) begin : g_src
    assign lane_evt[l]        = qe[l].size() ? qe[l][0] : '0;
    assign lane_evt_empty[l]  = qe[l].size() == 0;
    assign lane_data[l]       = qd[l].size() ? qd[l][0] : '0;
    assign lane_data_empty[l] = qd[l].size() == 0;
    always @(posedge clk) begin
      if (lane_evt_rd[l])  void'(qe[l].pop_front());
      if (lane_data_rd[l]) void'(qd[l].pop_front());
    end
  end

  Event sent[$];
  int checks = 0, failures = 0, n_type[3] = '{0, 0, 0}, n_full = 0, n_trunc_ev = 0;
  bit slow = 0, gen_done = 0;

  initial begin
    #20 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      Event e;
      int mode;
      e = new();
      mode = $urandom % 10;
      for (int l = 0; l < NLANES; l++) begin
        evt_meta_t m;
        logic [15:0] hs[$];
        m = '0; m.bxid = 12'(k);
        hs = {};
        for (int a = 0; a < 4; a++) begin
          AsicPkt p;
          p = new();
          p.bxid = 12'(k); p.trunc = 0; p.code = 0;
          if (mode == 0) begin p.kind = K_SPECIAL; p.code = CODE_BXVETO; end
          else if (mode == 1) begin p.kind = K_SPECIAL; p.code = CODE_HEADERONLY; end
          else if (mode == 2 && $urandom % 3 == 0) p.kind = K_NZS;
          else if (mode == 3 && $urandom % 5 == 0) begin p.kind = K_NORMAL; p.trunc = 1; end
          else begin
            p.kind = K_NORMAL;
            repeat ($urandom % 12) p.hits.push_back(rand_hit());
          end
          e.p[l][a] = p;
          if (!EN[4*l+a]) continue;
          m.heads[8*a +: 8] = p.head();
          m.en[a] = 1;
          if (p.kind == K_NORMAL && !p.trunc)
            foreach (p.hits[h]) hs.push_back({def_off(l, a), p.hits[h]});
        end
        m.nhits = 8'(hs.size());
        if (m.en != 0) begin
          qe[l].push_back(m);
          for (int i = 0; i < hs.size(); i += 4) begin
            hword_t w;
            w = '0;
            for (int j = 0; j < 4 && i + j < hs.size(); j++) begin
              w.hits[16*j +: 16] = hs[i+j]; w.cnt = 3'(j + 1);
            end
            qd[l].push_back(w);
          end
        end
      end
      sent.push_back(e);
      slow = (k >= 100 && k < 200);
      repeat (8) @(posedge clk);
    end
    gen_done = 1;
  end

  // PCIe reader / checker
  initial begin
    forever begin
      out_meta_t m, em;
      logic [255:0] got[$], exp_l[$];
      Event e;
      @(posedge clk_pcie);
      if (meta_empty) continue;
      if (slow && $urandom % 20 != 0) continue;
      m = pkt_meta;
      @(negedge clk_pcie); meta_rd = 1; @(negedge clk_pcie); meta_rd = 0;
      got = {};
      while (got.size() < int'(m.nlines)) begin
        @(posedge clk_pcie);
        if (!pkt_empty) begin
          got.push_back(pkt_data);
          @(negedge clk_pcie); pkt_rd = 1; @(negedge clk_pcie); pkt_rd = 0;
        end
      end
      e = sent.pop_front();
      expect_packet(e, EN, 4, exp_l, em);
      checks++;
      if (m != em) begin failures++; $display("meta got %h exp %h", m, em); end
      foreach (exp_l[i]) begin
        checks++;
        if (i >= got.size() || got[i] != exp_l[i]) begin
          failures++; $display("line %0d got %h\n        exp %h", i, i < got.size() ? got[i] : '0, exp_l[i]);
        end
      end
      if (m.ftype == FTYPE_NORMAL) n_type[0]++;
      if (m.ftype == FTYPE_FLAG)   n_type[1]++;
      if (m.ftype == FTYPE_SHORT)  n_type[2]++;
    end
  end
  always @(posedge clk) begin
    if (fifo_full) n_full++;
    if (ev_trunc) n_trunc_ev++;
  end

  initial begin
    wait (gen_done);
    wait (sent.size() == 0);
    repeat (20) @(posedge clk);
    checks += 3;
    if (n_type[0] == 0 || n_type[1] == 0 || n_type[2] == 0) begin
      failures++; $display("packet types seen %0d %0d %0d", n_type[0], n_type[1], n_type[2]);
    end
    if (n_full == 0) begin failures++; $display("line buffer never filled"); end
    if (n_trunc_ev == 0) begin failures++; $display("no truncated event reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: state %0d line %0d lines %0d sent %0d qe0 %0d qd0 %0d meta_empty %b", dut.state, dut.line, dut.p_lines, sent.size(), qe[0].size(), qd[0].size(), meta_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
