// dp_pkg: types and constants shared by the UT Data Processing blocks.
//
// A SALT hit arrives as 12 bits: a 7-bit channel number followed by a 5-bit
// ADC value. Inside the data path every hit is widened to 16 bits by putting
// a 4-bit ASIC offset in front of the channel, so that {offset, channel}
// forms the 11-bit strip number within the sensor. Four such hits make one
// 64-bit data word; hit 0 sits in bits [15:0].
//
// The event header (64 bits) carries the six 8-bit lane hit counts, a 4-bit
// FLAGS field and the 12-bit BXID; the Flag Header adds three 64-bit words
// holding the 8-bit headers of every ASIC. Bit positions and the FTYPE values
// 0x42/0x43/0x44 follow the published format. The special packet codes other
// than NZS (0b000110) are not published; the values below are this design's
// own and can be changed here.
package dp_pkg;

  localparam int NLANES        = 6;   // lanes (and Input Blocks) per half
  localparam int HIT_W         = 16;  // expanded hit
  localparam int HITS_PER_WORD = 4;   // hits per internal 64-bit word
  localparam int WORD_W        = HIT_W * HITS_PER_WORD;
  localparam int LINE_W        = 256; // PCIe output line

  typedef logic [HIT_W-1:0] hit_t;

  // One internal data word: up to four hits, hit 0 in the low bits, unused
  // hit slots zero, and the number of valid hits (1..4).
  typedef struct packed {
    logic [2:0]        cnt;
    logic [WORD_W-1:0] hits;
  } hword_t;

  // Per-ASIC 8-bit header as carried in the Flag Header:
  // bit 7 = 0, bit 6 = special flag, bits 5:0 = hit count (normal packet)
  // or packet code (special packet).
  typedef logic [7:0] ahead_t;

  // Event descriptor travelling next to the data words through the lane
  // builders: BXID, total hits, the headers of up to four ASICs (ASIC k in
  // bits [8k+7:8k]), which of those ASICs took part, and a BXID-mismatch flag.
  typedef struct packed {
    logic [11:0] bxid;
    logic [7:0]  nhits;
    logic [31:0] heads;
    logic [3:0]  en;
    logic        err;
  } evt_meta_t;

  // Event descriptor written by an Input Block for one ASIC packet.
  typedef struct packed {
    logic [11:0] bxid;
    ahead_t      head;
    logic [5:0]  nhits;
  } asic_evt_t;

  // Metadata handed to the PCIe side with every output packet.
  typedef struct packed {
    logic [11:0] bxid;
    logic [7:0]  ftype;
    logic [7:0]  nlines;  // packet length in 256-bit lines
    logic [3:0]  flags;
  } out_meta_t;

  localparam logic [7:0] FTYPE_NORMAL = 8'h42;
  localparam logic [7:0] FTYPE_FLAG   = 8'h43;
  localparam logic [7:0] FTYPE_SHORT  = 8'h44;

  localparam logic [5:0] CODE_NZS        = 6'b000110; // published
  localparam logic [5:0] CODE_BXVETO     = 6'b000100; // assumed
  localparam logic [5:0] CODE_HEADERONLY = 6'b000101; // assumed
  localparam logic [5:0] CODE_SYNC       = 6'b000111; // assumed
  localparam logic [5:0] CODE_TRUNC      = 6'b111111; // internal: truncated event

  // NZS payload after the 20-bit header: 24 bits of monitoring words
  // (MCM, MCM channels, memory space, parity) and 128 channels of 6 bits.
  localparam int NZS_BITS = 20 + 24 + 128 * 6;

  // FLAGS[1:0] "type summary" of a special packet code.
  function automatic logic [1:0] type_summary(input logic [5:0] code);
    case (code)
      CODE_SYNC:       return 2'b00;
      CODE_HEADERONLY: return 2'b01;
      CODE_BXVETO:     return 2'b10;
      default:         return 2'b11;
    endcase
  endfunction

endpackage
