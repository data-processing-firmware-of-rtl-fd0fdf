// salt_decoder_check: drives one salt_decoder of width W with random normal,
// special and NZS packets (with random idle gaps and, on request, truncation)
// and compares every hit word and event descriptor with the values worked
// out from the packets it built. Reports its counts on its outputs.
module salt_decoder_check
  import dp_pkg::*, tb_salt_pkg::*;
#(
  parameter int W = 24,
  parameter int NPKT = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  logic [W-1:0] din;
  logic         din_valid, truncate, hw_valid, ev_valid;
  hword_t       hw;
  asic_evt_t    ev;
  logic [3:0]   strip_off;

  salt_decoder #(.W(W)) dut (
    .clk, .rst_n, .din, .din_valid, .strip_off, .truncate,
    .hw_valid, .hw, .ev_valid, .ev
  );

  logic [15:0] exp_hits[$];
  asic_evt_t   exp_ev[$];
  int nhw, nev, words_in, cycles_busy;

  initial begin
    checks = 0; failures = 0; done = 0;
    din = '0; din_valid = 0; truncate = 0; strip_off = 4'(W / 8);
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int p = 0; p < NPKT; p++) begin
      logic [11:0] hits[$];
      logic [39:0] words[$];
      logic [11:0] bx;
      int kind, nh;
      logic [5:0] code;
      asic_evt_t e;
      logic tr;
      bx = 12'($urandom);
      kind = ($urandom % 10 < 7) ? K_NORMAL : (($urandom % 4 == 0) ? K_NZS : K_SPECIAL);
      code = 6'($urandom % 6);
      nh = ($urandom % 4 == 0) ? 63 : int'($urandom % 12);
      if (p == 0) begin kind = K_NORMAL; nh = 0; end
      hits = {};
      tr = ($urandom % 8 == 0);
      for (int i = 0; i < nh; i++) hits.push_back(rand_hit());
      make_packet(W, bx, kind, code, hits, words);
      e = '0; e.bxid = bx;
      if (tr) e.head = {2'b01, CODE_TRUNC};
      else if (kind == K_NORMAL) begin e.head = {2'b00, 6'(nh)}; e.nhits = 6'(nh); end
      else e.head = {2'b01, kind == K_NZS ? CODE_NZS : code};
      if (kind == K_NORMAL && !tr)
        foreach (hits[i]) exp_hits.push_back({strip_off, hits[i]});
      exp_ev.push_back(e);
      foreach (words[k]) begin
        @(negedge clk);
        din = words[k][W-1:0];
        din_valid = 1;
        truncate = (k == 0) ? tr : ~tr;  // only the header cycle's value may matter
        @(negedge clk);
        if ($urandom % 3 == 0) begin din_valid = 0; @(negedge clk); end
        din_valid = 0;
        words_in++;
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_hits.size() != 0 || exp_ev.size() != 0) begin
      failures++;
      $display("W=%0d: %0d hits / %0d events never came out", W, exp_hits.size(), exp_ev.size());
    end
    done = 1;
  end

  always @(posedge clk) begin
    if (hw_valid) begin
      checks++;
      if (hw.cnt == 0 || hw.cnt > 4) begin failures++; $display("W=%0d bad cnt %0d", W, hw.cnt); end
      for (int j = 0; j < 4; j++) begin
        if (j < int'(hw.cnt)) begin
          if (exp_hits.size() == 0 || hw.hits[16*j +: 16] != exp_hits[0]) begin
            failures++;
            $display("W=%0d hit mismatch got %h exp %h", W, hw.hits[16*j +: 16],
                     exp_hits.size() ? exp_hits[0] : 16'hxxxx);
          end
          if (exp_hits.size()) void'(exp_hits.pop_front());
        end else if (hw.hits[16*j +: 16] != 0) begin
          failures++; $display("W=%0d unused hit slot not zero", W);
        end
      end
    end
    if (ev_valid) begin
      checks++;
      if (exp_ev.size() == 0 || ev != exp_ev[0]) begin
        failures++;
        $display("W=%0d event mismatch got %h exp %h", W, ev, exp_ev.size() ? exp_ev[0] : '0);
      end
      if (exp_ev.size()) void'(exp_ev.pop_front());
    end
  end
endmodule
