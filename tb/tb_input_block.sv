// tb_input_block: one 4x3 Input Block with small FIFOs. Random SALT packets
// (normal, special, NZS) go into the four ASIC inputs on the framework clock,
// one word every fifth cycle; the processing-clock side reads descriptors
// and hit words and compares them with the packets sent (BXID, header byte,
// hit count, every expanded hit with its ASIC offset). While the reader is
// held back the FIFOs pass eps_h and the block must enter truncation mode:
// events then arrive flagged with the truncation code and without hits; the
// mode must end again once the FIFOs drain below eps_l. ASIC 3 is disabled
// for the second half and its packets must not appear.
module tb_input_block;
  import dp_pkg::*, tb_salt_pkg::*;
  localparam int NA = 4, W = 24;
  logic clk_in = 0, clk_dp = 0, rst_in_n = 1, rst_dp_n = 1;
  initial begin rst_in_n = 0; rst_dp_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #5 clk_in = ~clk_in;
  always #4 clk_dp = ~clk_dp;

  logic [W-1:0] din [NA];
  logic din_valid [NA];
  logic [NA-1:0] asic_en = '1;
  logic [3:0] strip_off [NA];
  logic [5:0] eps_h = 6'd12, eps_l = 6'd4;
  logic data_rd[NA], data_empty[NA], evt_rd[NA], evt_empty[NA];
  initial for (int a = 0; a < NA; a++) begin data_rd[a] = 0; evt_rd[a] = 0; end
  hword_t data_out[NA];
  asic_evt_t evt_out[NA];
  logic [6:0] evt_usedw;
  logic trunc_mode, trunc_event, fifo_full;

  input_block #(.ELINKS(3), .NASIC(NA), .DATA_DEPTH(32), .EVT_DEPTH(64)) dut (.*);

  int checks = 0, failures = 0, n_trunc = 0, n_trunc_on = 0, n_trunc_off = 0, n_nzs = 0;
  asic_evt_t exp_e[NA][$];
  logic [11:0] exp_h[NA][$];   // raw 12-bit hits of sent packets, in order, per event
  int          exp_n[NA][$];
  logic [15:0] hq[NA][$];      // hits expected from the data FIFO
  logic [39:0] wq[NA][$];
  bit hold = 0, gen_done = 0;

  initial for (int a = 0; a < NA; a++) strip_off[a] = 4'(4 + a);

  // stimulus
  initial begin
    for (int a = 0; a < NA; a++) begin din[a] = '0; din_valid[a] = 0; end
    #20 rst_in_n = 1; rst_dp_n = 1;
    for (int k = 0; k < 400; k++) begin
      if (k == 200) begin
        // let the links go idle, then disable ASIC 3
        while (wq[0].size() != 0 || wq[1].size() != 0 || wq[2].size() != 0 || wq[3].size() != 0) begin
          @(negedge clk_in);
          for (int a = 0; a < NA; a++) din_valid[a] = 0;
          repeat (4) @(negedge clk_in);
          for (int a = 0; a < NA; a++) if (wq[a].size()) begin
            din[a] = wq[a].pop_front()[W-1:0]; din_valid[a] = 1;
          end
        end
        @(negedge clk_in);
        for (int a = 0; a < NA; a++) din_valid[a] = 0;
        repeat (20) @(posedge clk_in);
        asic_en = 4'b0111;
        repeat (5) @(posedge clk_in);
      end
      hold = (k >= 60 && k < 100);
      for (int a = 0; a < NA; a++) begin
        logic [11:0] hits[$];
        logic [39:0] ws[$];
        int kind, nh;
        logic [5:0] code;
        asic_evt_t e;
        kind = ($urandom % 10 < 8) ? K_NORMAL : (($urandom % 3 == 0) ? K_NZS : K_SPECIAL);
        code = 6'd4;
        nh = int'($urandom % 6);
        hits = {};
        for (int h = 0; h < nh; h++) hits.push_back(rand_hit());
        make_packet(W, 12'(k), kind, code, hits, ws);
        if (asic_en[a]) begin
          e = '0; e.bxid = 12'(k);
          if (kind == K_NORMAL) begin e.head = {2'b00, 6'(nh)}; e.nhits = 6'(nh); end
          else e.head = {2'b01, kind == K_NZS ? CODE_NZS : code};
          if (kind == K_NZS) n_nzs++;
          exp_e[a].push_back(e);
          exp_n[a].push_back(kind == K_NORMAL ? nh : 0);
          if (kind == K_NORMAL) foreach (hits[i]) exp_h[a].push_back(hits[i]);
        end
        foreach (ws[i]) wq[a].push_back(ws[i]);
      end
      repeat (3) begin
        @(negedge clk_in);
        for (int a = 0; a < NA; a++) din_valid[a] = 0;
        @(negedge clk_in); @(negedge clk_in); @(negedge clk_in); @(negedge clk_in);
        for (int a = 0; a < NA; a++) if (wq[a].size()) begin
          din[a] = wq[a].pop_front()[W-1:0]; din_valid[a] = 1;
        end
      end
    end
    forever begin
      bit any;
      any = 0;
      @(negedge clk_in);
      for (int a = 0; a < NA; a++) din_valid[a] = 0;
      repeat (4) @(negedge clk_in);
      for (int a = 0; a < NA; a++) if (wq[a].size()) begin
        din[a] = wq[a].pop_front()[W-1:0]; din_valid[a] = 1; any = 1;
      end
      if (!any) break;
    end
    @(negedge clk_in);
    for (int a = 0; a < NA; a++) din_valid[a] = 0;
    gen_done = 1;
  end

  // reader
  for (genvar a = 0; a < NA; a++) begin : g_rd
    always @(negedge clk_dp) begin
      evt_rd[a] = rst_dp_n && !hold && !evt_empty[a];
      data_rd[a] = rst_dp_n && !hold && !data_empty[a] && hq[a].size() != 0;
    end
    always @(posedge clk_dp) begin
      if (evt_rd[a]) begin
        asic_evt_t e;
        int n;
        checks++;
        if (exp_e[a].size() == 0) begin failures++; $display("ASIC %0d: unexpected event", a); end
        else begin
          e = exp_e[a].pop_front();
          n = exp_n[a].pop_front();
          if (evt_out[a].head == {2'b01, CODE_TRUNC}) begin
            n_trunc++;
            if (evt_out[a].bxid != e.bxid || evt_out[a].nhits != 0) begin
              failures++; $display("ASIC %0d: truncated event %h for %h", a, evt_out[a], e);
            end
            repeat (n) void'(exp_h[a].pop_front());
          end else begin
            if (evt_out[a] != e) begin failures++; $display("ASIC %0d: event %h exp %h", a, evt_out[a], e); end
            repeat (n) hq[a].push_back({strip_off[a], exp_h[a].pop_front()});
          end
        end
      end
      if (data_rd[a]) begin
        checks++;
        if (data_out[a].cnt == 0 || data_out[a].cnt > 4) begin failures++; $display("bad cnt"); end
        for (int j = 0; j < 4; j++)
          if (j < int'(data_out[a].cnt)) begin
            if (hq[a].size() == 0 || data_out[a].hits[16*j +: 16] != hq[a][0]) begin
              failures++; $display("t=%0t ASIC %0d: hit %h exp %h", $time, a, data_out[a].hits[16*j +: 16], hq[a].size() ? hq[a][0] : 0);
            end
            if (hq[a].size()) void'(hq[a].pop_front());
          end else if (data_out[a].hits[16*j +: 16] != 0) begin
            failures++; $display("unused slot not zero");
          end
      end
    end
  end

  logic tq = 0;
  always @(posedge clk_in) begin
    if (trunc_mode && !tq) n_trunc_on++;
    if (!trunc_mode && tq) n_trunc_off++;
    tq <= trunc_mode;
  end

  initial begin
    wait (gen_done);
    wait (exp_e[0].size() == 0 && exp_e[1].size() == 0 && exp_e[2].size() == 0 && exp_e[3].size() == 0
          && hq[0].size() == 0 && hq[1].size() == 0 && hq[2].size() == 0 && hq[3].size() == 0
          && wq[0].size() == 0 && wq[3].size() == 0);
    repeat (200) @(posedge clk_dp);
    checks += 4;
    if (n_trunc == 0 || n_trunc_on == 0 || n_trunc_off == 0 || trunc_mode) begin
      failures++; $display("truncation: events %0d on %0d off %0d", n_trunc, n_trunc_on, n_trunc_off);
    end
    if (n_nzs == 0) begin failures++; $display("no NZS packet sent"); end
    for (int a = 0; a < NA; a++) if (!evt_empty[a] || !data_empty[a]) begin
      failures++; $display("ASIC %0d: FIFO not empty at the end", a);
    end
    if (exp_h[0].size() != 0) begin failures++; $display("hits left over"); end
    $display("truncated events %0d, NZS %0d", n_trunc, n_nzs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #3000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
