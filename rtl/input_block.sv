// input_block: entry stage for one framework stream (one optical link),
// carrying NASIC SALT ASICs of ELINKS e-links each (4 x 3, 2 x 3, 2 x 4 or
// 2 x 5; the flavour is fixed by the two parameters).
//
// Per ASIC it holds a salt_decoder and two dual-clock FIFOs, written in the
// framework clock (clk_in) and read in the processing clock (clk_dp): one for
// 64-bit hit words (hword_t) and one, the Event FIFO, for the per-packet
// descriptor (asic_evt_t). A descriptor is written no earlier than the last
// hit word of its packet, so a reader that sees a descriptor finds all of its
// data already queued. Both read ports are show-ahead.
//
// Disabled ASICs (asic_en low) are ignored: their words never reach the
// decoder. Truncation protection: the largest occupancy among the data and
// Event FIFOs (write side) of the enabled ASICs is compared with eps_h (a
// disabled ASIC's FIFOs are not read, so they are left out); above it the
// block enters truncation mode
// and stays there until the occupancy falls below eps_l (hysteresis). A
// packet that starts in truncation mode loses its hits and is reported as a
// special event with code CODE_TRUNC. The configuration inputs are treated as
// quasi-static and are brought into clk_in through two flip-flops.
module input_block
  import dp_pkg::*;
#(
  parameter int ELINKS     = 3,
  parameter int NASIC      = 4,
  parameter int DATA_DEPTH = 512,
  parameter int EVT_DEPTH  = 512
) (
  // framework side
  input  logic                 clk_in,
  input  logic                 rst_in_n,
  input  logic [8*ELINKS-1:0]  din       [NASIC],
  input  logic                 din_valid [NASIC],
  // configuration (quasi-static)
  input  logic [NASIC-1:0]     asic_en,
  input  logic [3:0]           strip_off [NASIC],
  input  logic [$clog2(DATA_DEPTH):0] eps_h,
  input  logic [$clog2(DATA_DEPTH):0] eps_l,
  // processing side
  input  logic                 clk_dp,
  input  logic                 rst_dp_n,
  input  logic                 data_rd   [NASIC],
  output hword_t               data_out  [NASIC],
  output logic                 data_empty[NASIC],
  input  logic                 evt_rd    [NASIC],
  output asic_evt_t            evt_out   [NASIC],
  output logic                 evt_empty [NASIC],
  // monitoring
  output logic [$clog2(EVT_DEPTH):0] evt_usedw,   // ASIC 0 Event FIFO, clk_dp side
  output logic                 trunc_mode,         // clk_in domain
  output logic                 trunc_event,        // clk_in pulse per truncated packet
  output logic                 fifo_full           // clk_in: some FIFO of the block is full
);
  localparam int W   = 8 * ELINKS;
  localparam int DAW = $clog2(DATA_DEPTH);
  localparam int EAW = $clog2(EVT_DEPTH);

  // configuration into clk_in
  logic [NASIC-1:0] en_s1, en_s2;
  logic [DAW:0]     eh_s1, eh_s2, el_s1, el_s2;
  logic [3:0]       off_s1 [NASIC];
  logic [3:0]       off_s2 [NASIC];
  always_ff @(posedge clk_in or negedge rst_in_n) begin
    if (!rst_in_n) begin
      en_s1 <= '0; en_s2 <= '0; eh_s1 <= '0; eh_s2 <= '0; el_s1 <= '0; el_s2 <= '0;
      for (int a = 0; a < NASIC; a++) begin off_s1[a] <= '0; off_s2[a] <= '0; end
    end else begin
      en_s1 <= asic_en; en_s2 <= en_s1;
      eh_s1 <= eps_h;   eh_s2 <= eh_s1;
      el_s1 <= eps_l;   el_s2 <= el_s1;
      for (int a = 0; a < NASIC; a++) begin off_s1[a] <= strip_off[a]; off_s2[a] <= off_s1[a]; end
    end
  end

  logic [DAW:0] d_usedw [NASIC];
  logic [NASIC-1:0] d_full, e_full, ev_tr;
  logic [EAW:0] e_rd_usedw [NASIC];
  logic [EAW:0] e_wr_usedw [NASIC];

  for (genvar a = 0; a < NASIC; a++) begin : g_asic
    logic      hw_valid, ev_valid;
    hword_t    hw;
    asic_evt_t ev;
    logic [DAW:0] d_rd_usedw;

    salt_decoder #(.W(W)) u_dec (
      .clk(clk_in), .rst_n(rst_in_n),
      .din(din[a]), .din_valid(din_valid[a] && en_s2[a]),
      .strip_off(off_s2[a]), .truncate(trunc_mode),
      .hw_valid, .hw, .ev_valid, .ev
    );

    async_fifo #(.WIDTH($bits(hword_t)), .DEPTH(DATA_DEPTH)) u_data (
      .wr_clk(clk_in), .wr_rst_n(rst_in_n), .wr_en(hw_valid), .wr_data(hw),
      .wr_full(d_full[a]), .wr_usedw(d_usedw[a]),
      .rd_clk(clk_dp), .rd_rst_n(rst_dp_n), .rd_en(data_rd[a]), .rd_data(data_out[a]),
      .rd_empty(data_empty[a]), .rd_usedw(d_rd_usedw)
    );

    async_fifo #(.WIDTH($bits(asic_evt_t)), .DEPTH(EVT_DEPTH)) u_evt (
      .wr_clk(clk_in), .wr_rst_n(rst_in_n), .wr_en(ev_valid), .wr_data(ev),
      .wr_full(e_full[a]), .wr_usedw(e_wr_usedw[a]),
      .rd_clk(clk_dp), .rd_rst_n(rst_dp_n), .rd_en(evt_rd[a]), .rd_data(evt_out[a]),
      .rd_empty(evt_empty[a]), .rd_usedw(e_rd_usedw[a])
    );

    assign ev_tr[a] = ev_valid && ev.head == {2'b01, CODE_TRUNC};
  end

  assign evt_usedw = e_rd_usedw[0];

  // truncation mode with hysteresis, on the fullest data or Event FIFO
  localparam int OW = (DAW > EAW) ? DAW : EAW;
  logic [OW:0] occ;
  always_comb begin
    occ = '0;
    for (int a = 0; a < NASIC; a++) if (en_s2[a]) begin
      if ((OW+1)'(d_usedw[a]) > occ) occ = (OW+1)'(d_usedw[a]);
      if ((OW+1)'(e_wr_usedw[a]) > occ) occ = (OW+1)'(e_wr_usedw[a]);
    end
  end

  always_ff @(posedge clk_in or negedge rst_in_n) begin
    if (!rst_in_n) trunc_mode <= 1'b0;
    else if (!trunc_mode && occ > (OW+1)'(eh_s2)) trunc_mode <= 1'b1;
    else if (trunc_mode && occ < (OW+1)'(el_s2))  trunc_mode <= 1'b0;
  end

  assign trunc_event = |ev_tr;
  assign fifo_full   = |d_full || |e_full;
endmodule
