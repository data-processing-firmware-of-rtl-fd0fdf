// tb_mini_lane_builder: feeds two sources of events, each split into data
// words of random fill (1..4 hits), into a Mini Lane Builder with small
// output buffers, and reads its outputs with random stalls so that the
// buffers fill and the block must hold back. Checks every output word (hits
// of A then B, packed four to a word, last word zero-filled) and every
// merged descriptor (BXID, count, headers, enables, mismatch flag), one
// injected BXID mismatch included; a final phase disables side B.
module tb_mini_lane_builder;
  import dp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial begin rst_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #2 clk = ~clk;

  logic en_a = 1, en_b = 1;
  evt_meta_t a_evt, b_evt, out_evt;
  hword_t a_data, b_data, out_data;
  logic a_evt_empty, a_evt_rd, a_data_empty, a_data_rd;
  logic b_evt_empty, b_evt_rd, b_data_empty, b_data_rd;
  logic out_evt_empty, out_evt_rd, out_data_empty, out_data_rd, out_full, bxid_err;
  initial begin out_evt_rd = 0; out_data_rd = 0; end
  logic [2:0] out_evt_usedw;

  mini_lane_builder #(.NA(1), .NB(1), .DATA_DEPTH(8), .EVT_DEPTH(4)) dut (.*);

  evt_meta_t qa_e[$], qb_e[$], exp_e[$];
  hword_t    qa_d[$], qb_d[$], exp_d[$];
  assign a_evt = qa_e.size() ? qa_e[0] : '0;  assign a_evt_empty = qa_e.size() == 0;
  assign b_evt = qb_e.size() ? qb_e[0] : '0;  assign b_evt_empty = qb_e.size() == 0;
  assign a_data = qa_d.size() ? qa_d[0] : '0; assign a_data_empty = qa_d.size() == 0;
  assign b_data = qb_d.size() ? qb_d[0] : '0; assign b_data_empty = qb_d.size() == 0;
  always @(posedge clk) begin
    if (a_evt_rd)  void'(qa_e.pop_front());
    if (b_evt_rd)  void'(qb_e.pop_front());
    if (a_data_rd) void'(qa_d.pop_front());
    if (b_data_rd) void'(qb_d.pop_front());
  end

  int checks = 0, failures = 0, stalls = 0, errs = 0;
  bit slow = 0;

  function automatic void add_source(ref evt_meta_t qe[$], ref hword_t qd[$],
                                     input logic [11:0] bx, input int nh, ref hit_t all[$]);
    evt_meta_t m;
    int left;
    m = '0; m.bxid = bx; m.nhits = 8'(nh); m.heads = 32'({2'b00, 6'(nh)}); m.en = 4'b0001;
    qe.push_back(m);
    left = nh;
    while (left > 0) begin
      hword_t w;
      int c;
      c = 1 + int'($urandom % 4);
      if (c > left) c = left;
      w = '0; w.cnt = 3'(c);
      for (int i = 0; i < c; i++) begin
        hit_t h;
        h = hit_t'($urandom);
        w.hits[16*i +: 16] = h;
        all.push_back(h);
      end
      qd.push_back(w);
      left -= c;
    end
  endfunction

  task automatic make_event(input int k, input bit use_b);
    hit_t all[$];
    evt_meta_t m;
    int na, nb;
    logic [11:0] bx;
    bx = 12'(k);
    na = ($urandom % 5 == 0) ? 0 : int'($urandom % 20);
    nb = ($urandom % 5 == 0) ? 0 : int'($urandom % 20);
    if (!use_b) nb = 0;
    add_source(qa_e, qa_d, bx, na, all);
    if (use_b) add_source(qb_e, qb_d, (k == 100) ? 12'hFFF : bx, nb, all);
    m = '0; m.bxid = bx; m.nhits = 8'(na + nb);
    m.heads = 32'({2'b00, 6'(na)}) | (use_b ? 32'({2'b00, 6'(nb)}) << 8 : 32'd0);
    m.en = use_b ? 4'b0011 : 4'b0001;
    m.err = (k == 100);
    exp_e.push_back(m);
    for (int i = 0; i < all.size(); i += 4) begin
      hword_t w;
      w = '0;
      for (int j = 0; j < 4 && i + j < all.size(); j++) begin
        w.hits[16*j +: 16] = all[i+j]; w.cnt = 3'(j + 1);
      end
      exp_d.push_back(w);
    end
  endtask

  // consumer
  always @(negedge clk) begin
    out_evt_rd = 0; out_data_rd = 0;
    if (rst_n) begin
      if (!out_evt_empty && (!slow || $urandom % 6 == 0)) out_evt_rd = 1;
      if (!out_data_empty && (!slow || $urandom % 6 == 0)) out_data_rd = 1;
    end
  end
  always @(posedge clk) begin
    if (out_evt_rd) begin
      checks++;
      if (exp_e.size() == 0 || out_evt != exp_e[0]) begin
        failures++; $display("t=%0t event got %h exp %h", $time, out_evt, exp_e.size() ? exp_e[0] : '0);
      end
      if (exp_e.size()) void'(exp_e.pop_front());
    end
    if (out_data_rd) begin
      checks++;
      if (exp_d.size() == 0 || out_data != exp_d[0]) begin
        failures++; $display("t=%0t word got %h exp %h", $time, out_data, exp_d.size() ? exp_d[0] : '0);
      end
      if (exp_d.size()) void'(exp_d.pop_front());
    end
    if (out_full) stalls++;
    if (bxid_err) errs++;
  end

  initial begin
    #5 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      slow = (k >= 50 && k < 150);
      make_event(k, 1);
      repeat (4) @(posedge clk);
    end
    wait (exp_e.size() == 0 && exp_d.size() == 0);
    @(negedge clk); en_b = 0;
    for (int k = 300; k < 350; k++) begin make_event(k, 0); repeat (3) @(posedge clk); end
    wait (exp_e.size() == 0 && exp_d.size() == 0);
    repeat (10) @(posedge clk);
    checks += 2;
    if (stalls == 0) begin failures++; $display("output never filled"); end
    if (errs != 1) begin failures++; $display("bxid_err pulses %0d", errs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
