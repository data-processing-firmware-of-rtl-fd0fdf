// salt_decoder: turns the packet stream of one SALT ASIC into expanded hits.
//
// The framework delivers one W-bit word per valid cycle (W = 8 x e-links:
// 24, 32 or 40). A packet starts at a word boundary and is read MSB first:
// 12-bit BXID, parity bit, type bit, then either a 6-bit hit count (type 0)
// or a 6-bit packet code (type 1). Normal packets continue with the hits,
// 12 bits each (7-bit channel, 5-bit ADC), packed back to back across word
// boundaries; the tail of the last word is padding.
//
// Alignment: the bits not yet consumed are kept MSB-aligned in a small
// accumulator. Each cycle the new word is appended behind them and every
// complete hit is taken, at most four. Because at most 11 bits are left over
// and a word adds at most 40, no more than four hits are ever pending, so the
// decoder never stalls and never needs a cycle without input. This is one
// general shifter in place of the published per-flavour register pipelines
// (one, two or five alignment structures); it delivers the same hit order.
//
// Each hit leaves as 16 bits {strip_off, channel, adc}, i.e. the 11-bit
// strip number followed by the ADC value. Up to four hits per cycle form one
// hword_t (hit 0 in the low bits). When a packet is complete an asic_evt_t
// is emitted (in the cycle of its last data word, never before it).
//
// Special packets other than NZS are one word long; NZS packets (code
// 0b000110) are consumed for their full length (NZS_BITS) but their channel
// data are not forwarded: the event is reported as special with code NZS.
// With `truncate` high when a packet starts, its hits are dropped and the
// event is reported as special with the internal code CODE_TRUNC.
// The parity bit is not checked.
module salt_decoder
  import dp_pkg::*;
#(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         din_valid,
  input  logic [3:0]   strip_off,
  input  logic         truncate,
  output logic         hw_valid,
  output hword_t       hw,
  output logic         ev_valid,
  output asic_evt_t    ev
);
  localparam int ACC_W     = 64;
  localparam int NZS_WORDS = (NZS_BITS + W - 1) / W;  // including the header word

  typedef enum logic [1:0] {S_HEAD, S_HITS, S_SKIP} state_t;
  state_t state;

  logic [ACC_W-1:0] acc;      // pending bits, MSB aligned
  logic [5:0]       acc_n;    // number of pending bits (< 12 between words)
  logic [5:0]       rem;      // hits still expected in the packet
  logic [7:0]       skip;     // NZS words still to consume
  logic             trunc_q;
  logic [11:0]      bxid_q;
  logic [5:0]       nh_q;

  // header fields of the current word
  logic [11:0] h_bxid;
  logic        h_type;
  logic [5:0]  h_field;
  assign h_bxid  = din[W-1 -: 12];
  assign h_type  = din[W-14];
  assign h_field = din[W-15 -: 6];

  // append the incoming payload bits behind the pending ones
  logic [ACC_W-1:0] in_bits, comb;
  logic [6:0]       in_n, comb_n;
  logic [5:0]       want;
  logic [2:0]       take;
  logic [2:0]       avail;

  always_comb begin
    if (state == S_HEAD) begin
      in_bits = {din, {(ACC_W-W){1'b0}}} << 20;
      in_n    = 7'(W - 20);
      want    = h_field;
    end else begin
      in_bits = {din, {(ACC_W-W){1'b0}}};
      in_n    = 7'(W);
      want    = rem;
    end
    comb   = acc | (in_bits >> acc_n);
    comb_n = 7'(acc_n) + in_n;
    avail  = (comb_n >= 7'd48) ? 3'd4 : 3'(comb_n / 7'd12);
    take   = (6'(avail) > want) ? want[2:0] : avail;
  end

  // hits of this cycle
  logic normal_pkt;
  assign normal_pkt = (state == S_HITS) || (state == S_HEAD && !h_type);

  always_comb begin
    hw = '0;
    hw.cnt = take;
    for (int j = 0; j < HITS_PER_WORD; j++) begin
      if (3'(j) < take)
        hw.hits[HIT_W*j +: HIT_W] = {strip_off, comb[ACC_W-1-12*j -: 12]};
    end
  end

  logic cur_trunc;
  assign cur_trunc = (state == S_HEAD) ? truncate : trunc_q;
  assign hw_valid  = din_valid && normal_pkt && take != 0 && !cur_trunc;

  // event emission
  always_comb begin
    ev_valid = 1'b0;
    ev       = '0;
    if (din_valid) begin
      unique case (state)
        S_HEAD: begin
          ev.bxid = h_bxid;
          if (h_type) begin
            ev.head = {2'b01, truncate ? CODE_TRUNC : h_field};
            ev_valid = (h_field != CODE_NZS);
          end else begin
            ev.head  = truncate ? {2'b01, CODE_TRUNC} : {2'b00, h_field};
            ev.nhits = truncate ? 6'd0 : h_field;
            ev_valid = (6'(take) == h_field);
          end
        end
        S_HITS: begin
          ev.bxid  = bxid_q;
          ev.head  = trunc_q ? {2'b01, CODE_TRUNC} : {2'b00, nh_q};
          ev.nhits = trunc_q ? 6'd0 : nh_q;
          ev_valid = (6'(take) == rem);
        end
        S_SKIP: begin
          ev.bxid  = bxid_q;
          ev.head  = {2'b01, trunc_q ? CODE_TRUNC : CODE_NZS};
          ev_valid = (skip == 8'd1);
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HEAD; acc <= '0; acc_n <= '0; rem <= '0; skip <= '0;
      trunc_q <= 1'b0; bxid_q <= '0; nh_q <= '0;
    end else if (din_valid) begin
      unique case (state)
        S_HEAD: begin
          bxid_q  <= h_bxid;
          nh_q    <= h_field;
          trunc_q <= truncate;
          acc     <= '0;
          acc_n   <= '0;
          if (h_type) begin
            if (h_field == CODE_NZS) begin
              skip  <= 8'(NZS_WORDS - 1);
              state <= S_SKIP;
            end
          end else if (6'(take) != h_field) begin
            rem   <= h_field - 6'(take);
            acc   <= comb << (12 * take);
            acc_n <= 6'(comb_n - 7'(12) * 7'(take));
            state <= S_HITS;
          end
        end
        S_HITS: begin
          rem <= rem - 6'(take);
          if (6'(take) == rem) begin
            acc   <= '0;
            acc_n <= '0;
            state <= S_HEAD;
          end else begin
            acc   <= comb << (12 * take);
            acc_n <= 6'(comb_n - 7'(12) * 7'(take));
          end
        end
        S_SKIP: begin
          skip <= skip - 8'd1;
          if (skip == 8'd1) state <= S_HEAD;
        end
        default: state <= S_HEAD;
      endcase
    end
  end

  initial assert (W == 24 || W == 32 || W == 40)
    else $error("salt_decoder: W must be 24, 32 or 40");
endmodule
