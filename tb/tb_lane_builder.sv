// tb_lane_builder: checks the four-ASIC tree (three Mini Lane Builders) and
// the two-ASIC lane (one Mini Lane Builder). Random ASIC events, split into
// words of random fill, are offered as the Input Block would; the lane
// output must hold, per event, the hits of ASIC 0, 1, 2, 3 in that order
// packed four to a word, and a descriptor with the total count and the
// ASIC headers in bytes 0..3. A later phase disables ASIC 2 of the
// four-ASIC lane; the output is read with random stalls.
module tb_lane_builder;
  import dp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial begin rst_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  bit slow = 0;

  // ---------------- sources: index 0..3 four-ASIC lane, 4..5 two-ASIC lane
  asic_evt_t qe[6][$];
  hword_t    qd[6][$];
  asic_evt_t in_evt [6];
  hword_t    in_data[6];
  logic      in_evt_empty[6], in_evt_rd[6], in_data_empty[6], in_data_rd[6];
  for (genvar i = 0; i < 6; i++) begin : g_src
    assign in_evt[i]        = qe[i].size() ? qe[i][0] : '0;
    assign in_evt_empty[i]  = qe[i].size() == 0;
    assign in_data[i]       = qd[i].size() ? qd[i][0] : '0;
    assign in_data_empty[i] = qd[i].size() == 0;
    always @(posedge clk) begin
      if (in_evt_rd[i])  void'(qe[i].pop_front());
      if (in_data_rd[i]) void'(qd[i].pop_front());
    end
  end

  logic [3:0] en4 = 4'b1111;
  evt_meta_t o_evt[2];
  hword_t    o_data[2];
  logic o_evt_empty[2], o_evt_rd[2], o_data_empty[2], o_data_rd[2], o_full[2], o_err[2];
  initial for (int d = 0; d < 2; d++) begin o_evt_rd[d] = 0; o_data_rd[d] = 0; end
  logic [4:0] fu[2], iu[2];

  lane_builder #(.NASIC(4), .DATA_DEPTH(16), .EVT_DEPTH(16)) dut4 (
    .clk, .rst_n, .asic_en(en4),
    .in_evt(in_evt[0:3]), .in_evt_empty(in_evt_empty[0:3]), .in_evt_rd(in_evt_rd[0:3]),
    .in_data(in_data[0:3]), .in_data_empty(in_data_empty[0:3]), .in_data_rd(in_data_rd[0:3]),
    .out_evt(o_evt[0]), .out_evt_empty(o_evt_empty[0]), .out_evt_rd(o_evt_rd[0]),
    .out_data(o_data[0]), .out_data_empty(o_data_empty[0]), .out_data_rd(o_data_rd[0]),
    .final_evt_usedw(fu[0]), .inter_evt_usedw(iu[0]), .fifo_full(o_full[0]), .bxid_err(o_err[0]));
  lane_builder #(.NASIC(2), .DATA_DEPTH(16), .EVT_DEPTH(16)) dut2 (
    .clk, .rst_n, .asic_en(2'b11),
    .in_evt(in_evt[4:5]), .in_evt_empty(in_evt_empty[4:5]), .in_evt_rd(in_evt_rd[4:5]),
    .in_data(in_data[4:5]), .in_data_empty(in_data_empty[4:5]), .in_data_rd(in_data_rd[4:5]),
    .out_evt(o_evt[1]), .out_evt_empty(o_evt_empty[1]), .out_evt_rd(o_evt_rd[1]),
    .out_data(o_data[1]), .out_data_empty(o_data_empty[1]), .out_data_rd(o_data_rd[1]),
    .final_evt_usedw(fu[1]), .inter_evt_usedw(iu[1]), .fifo_full(o_full[1]), .bxid_err(o_err[1]));

  evt_meta_t exp_e[2][$];
  hword_t    exp_d[2][$];

  task automatic make_event(input int k);
    for (int d = 0; d < 2; d++) begin
      hit_t all[$];
      evt_meta_t m;
      int n = (d == 0) ? 4 : 2;
      m = '0; m.bxid = 12'(k);
      for (int a = 0; a < n; a++) begin
        int src = (d == 0) ? a : 4 + a;
        bit on = (d == 1) || en4[a];
        int nh, left;
        asic_evt_t e;
        nh = ($urandom % 4 == 0) ? 0 : int'($urandom % 16);
        e.bxid = 12'(k); e.nhits = 6'(nh);
        e.head = ($urandom % 10 == 0) ? {2'b01, 6'd4} : {2'b00, 6'(nh)};
        if (e.head[6]) begin e.nhits = 0; nh = 0; end
        if (!on) continue;
        qe[src].push_back(e);
        left = nh;
        while (left > 0) begin
          hword_t w;
          int c = 1 + int'($urandom % 4);
          if (c > left) c = left;
          w = '0; w.cnt = 3'(c);
          for (int i = 0; i < c; i++) begin
            hit_t h = hit_t'($urandom);
            w.hits[16*i +: 16] = h; all.push_back(h);
          end
          qd[src].push_back(w);
          left -= c;
        end
        m.nhits += 8'(nh);
        m.heads[8*a +: 8] = e.head;
        m.en[a] = 1'b1;
      end
      exp_e[d].push_back(m);
      for (int i = 0; i < all.size(); i += 4) begin
        hword_t w;
        w = '0;
        for (int j = 0; j < 4 && i + j < all.size(); j++) begin
          w.hits[16*j +: 16] = all[i+j]; w.cnt = 3'(j + 1);
        end
        exp_d[d].push_back(w);
      end
    end
  endtask

  int stalls = 0;
  for (genvar d = 0; d < 2; d++) begin : g_chk
    always @(negedge clk) begin
      o_evt_rd[d] = 0; o_data_rd[d] = 0;
      if (rst_n) begin
        if (!o_evt_empty[d] && (!slow || $urandom % 5 == 0)) o_evt_rd[d] = 1;
        if (!o_data_empty[d] && (!slow || $urandom % 5 == 0)) o_data_rd[d] = 1;
      end
    end
    always @(posedge clk) begin
      if (o_full[d]) stalls++;
      if (o_evt_rd[d]) begin
        checks++;
        if (exp_e[d].size() == 0 || o_evt[d] != exp_e[d][0]) begin
          failures++; $display("lane %0d event got %h exp %h", d, o_evt[d], exp_e[d].size() ? exp_e[d][0] : '0);
        end
        if (exp_e[d].size()) void'(exp_e[d].pop_front());
      end
      if (o_data_rd[d]) begin
        checks++;
        if (exp_d[d].size() == 0 || o_data[d] != exp_d[d][0]) begin
          failures++; $display("lane %0d word got %h exp %h", d, o_data[d], exp_d[d].size() ? exp_d[d][0] : '0);
        end
        if (exp_d[d].size()) void'(exp_d[d].pop_front());
      end
    end
  end

  initial begin
    #5 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      if (k == 250) begin
        wait (exp_e[0].size() == 0 && exp_e[1].size() == 0);
        @(negedge clk); en4 = 4'b1011;
      end
      slow = (k >= 60 && k < 160);
      make_event(k);
      repeat (5) @(posedge clk);
    end
    wait (exp_e[0].size() == 0 && exp_e[1].size() == 0 && exp_d[0].size() == 0 && exp_d[1].size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
