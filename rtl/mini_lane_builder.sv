// mini_lane_builder: the two-input merging primitive of the Lane Builder.
//
// Inputs A and B each offer an event descriptor (evt_meta_t) and the data
// words of their events, both through show-ahead FIFO read ports. One event
// is taken from each enabled side (they belong to the same bunch crossing,
// since every source emits exactly one event per crossing in order); the
// hits of A, then those of B, are repacked into full words of four hits and
// written to this block's own output buffers, followed by the merged
// descriptor: total hit count, ASIC headers of B placed above those of A
// (NA ASICs on side A), and an error flag when the two BXIDs differ.
//
// Flow control follows the demand-driven scheme: an event is started only
// when both inputs have one ready and the output Event FIFO has room; a data
// word is taken only while the output Data FIFO has room, so a full output
// stalls this block and the stall spreads upstream as the input FIFOs fill.
//
// Timing: one input word per cycle; per event one extra cycle to start and
// one to flush the last, partly filled word together with the descriptor.
// A side whose ASICs are all disabled (en_a / en_b low) is not waited for
// and contributes nothing.
module mini_lane_builder
  import dp_pkg::*;
#(
  parameter int NA         = 1,
  parameter int NB         = 1,
  parameter int DATA_DEPTH = 256,
  parameter int EVT_DEPTH  = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en_a,
  input  logic      en_b,
  // side A
  input  evt_meta_t a_evt,
  input  logic      a_evt_empty,
  output logic      a_evt_rd,
  input  hword_t    a_data,
  input  logic      a_data_empty,
  output logic      a_data_rd,
  // side B
  input  evt_meta_t b_evt,
  input  logic      b_evt_empty,
  output logic      b_evt_rd,
  input  hword_t    b_data,
  input  logic      b_data_empty,
  output logic      b_data_rd,
  // output buffers (show-ahead read ports)
  output evt_meta_t out_evt,
  output logic      out_evt_empty,
  input  logic      out_evt_rd,
  output hword_t    out_data,
  output logic      out_data_empty,
  input  logic      out_data_rd,
  output logic [$clog2(EVT_DEPTH):0] out_evt_usedw,
  output logic      out_full,
  output logic      bxid_err   // pulse: merged an event whose BXIDs differ
);
  typedef enum logic [1:0] {S_IDLE, S_A, S_B, S_FLUSH} state_t;
  state_t state;

  evt_meta_t ma, mb;
  logic [7:0] rem;
  hit_t pend [3];
  logic [2:0] pend_n;

  logic d_full, e_full;
  logic [$clog2(DATA_DEPTH):0] d_usedw;

  // current input word
  logic   on_a, in_ok, pop;
  hword_t w;
  assign on_a  = (state == S_A);
  assign w     = on_a ? a_data : b_data;
  assign in_ok = on_a ? !a_data_empty : !b_data_empty;
  assign pop   = (state == S_A || state == S_B) && in_ok && !d_full;

  // packer: pending hits followed by the new word
  hit_t       c [7];
  logic [3:0] total;
  always_comb begin
    total = 4'(pend_n) + 4'(w.cnt);
    for (int i = 0; i < 7; i++) begin
      c[i] = '0;
      if (3'(i) < pend_n) c[i] = pend[i];
      else if (i - int'(pend_n) < int'(w.cnt) && i - int'(pend_n) < 4)
        c[i] = w.hits[HIT_W*(i - int'(pend_n)) +: HIT_W];
    end
  end

  // output writes
  logic      d_wr, e_wr;
  hword_t    d_wdata;
  evt_meta_t e_wdata;
  always_comb begin
    d_wr = 1'b0;
    d_wdata = '0;
    if (pop && total >= 4'd4) begin
      d_wr = 1'b1;
      d_wdata.cnt = 3'd4;
      for (int i = 0; i < 4; i++) d_wdata.hits[HIT_W*i +: HIT_W] = c[i];
    end else if (state == S_FLUSH && pend_n != 0 && !d_full) begin
      d_wr = 1'b1;
      d_wdata.cnt = pend_n;
      for (int i = 0; i < 3; i++)
        if (3'(i) < pend_n) d_wdata.hits[HIT_W*i +: HIT_W] = pend[i];
    end
  end

  logic flush_ok;
  assign flush_ok = (state == S_FLUSH) && (pend_n == 0 || !d_full);
  assign e_wr     = flush_ok;
  always_comb begin
    e_wdata       = '0;
    e_wdata.bxid  = en_a ? ma.bxid : mb.bxid;
    e_wdata.nhits = ma.nhits + mb.nhits;
    e_wdata.heads = ma.heads | (mb.heads << (8 * NA));
    e_wdata.en    = ma.en | (mb.en << NA);
    e_wdata.err   = ma.err | mb.err | (en_a && en_b && ma.bxid != mb.bxid);
  end
  assign bxid_err = flush_ok && en_a && en_b && ma.bxid != mb.bxid;

  logic start;
  assign start = (state == S_IDLE) && (en_a || en_b) && (!en_a || !a_evt_empty) &&
                 (!en_b || !b_evt_empty) && !e_full;
  assign a_evt_rd  = start && en_a;
  assign b_evt_rd  = start && en_b;
  assign a_data_rd = pop && on_a;
  assign b_data_rd = pop && !on_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ma <= '0; mb <= '0; rem <= '0; pend_n <= '0;
      for (int i = 0; i < 3; i++) pend[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          ma <= en_a ? a_evt : '0;
          mb <= en_b ? b_evt : '0;
          if (en_a && a_evt.nhits != 0) begin
            rem <= a_evt.nhits; state <= S_A;
          end else if (en_b && b_evt.nhits != 0) begin
            rem <= b_evt.nhits; state <= S_B;
          end else state <= S_FLUSH;
        end
        S_A, S_B: if (pop) begin
          rem <= rem - 8'(w.cnt);
          if (rem == 8'(w.cnt)) begin
            if (state == S_A && mb.nhits != 0) begin
              rem <= mb.nhits; state <= S_B;
            end else state <= S_FLUSH;
          end
          if (total >= 4'd4) begin
            pend_n <= 3'(total - 4'd4);
            for (int i = 0; i < 3; i++) pend[i] <= c[i+4];
          end else begin
            pend_n <= 3'(total);
            for (int i = 0; i < 3; i++) pend[i] <= c[i];
          end
        end
        S_FLUSH: if (flush_ok) begin
          pend_n <= '0;
          for (int i = 0; i < 3; i++) pend[i] <= '0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  sync_fifo #(.WIDTH($bits(hword_t)), .DEPTH(DATA_DEPTH)) u_data (
    .clk, .rst_n, .wr_en(d_wr), .wr_data(d_wdata), .full(d_full),
    .rd_en(out_data_rd), .rd_data(out_data), .empty(out_data_empty), .usedw(d_usedw)
  );
  sync_fifo #(.WIDTH($bits(evt_meta_t)), .DEPTH(EVT_DEPTH)) u_evt (
    .clk, .rst_n, .wr_en(e_wr), .wr_data(e_wdata), .full(e_full),
    .rd_en(out_evt_rd), .rd_data(out_evt), .empty(out_evt_empty), .usedw(out_evt_usedw)
  );
  assign out_full = d_full || e_full;

  // a data word never carries more hits than its event has left
  a_word_in_event: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> (w.cnt != 0 && 8'(w.cnt) <= rem));
endmodule
