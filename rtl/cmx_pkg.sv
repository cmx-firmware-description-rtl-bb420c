// cmx_pkg: sizes, record types and small functions shared by the CMX base and
// board support logic.
//
// Numbers that come straight from the firmware description: 16 processor inputs
// of 24 lines at 160 Mbps (96 bits per bunch crossing), 25 jet thresholds, up to
// 32 trigger objects (TOBs) towards L1Topo, 24 GTX streams of 128 bits per bunch
// crossing, 20 G-Link user data lines.
// Design choices of this implementation (the description leaves them open): the
// layout of a jet TOB inside the 96-bit input word, 3-bit saturating
// multiplicities, a 12-bit bunch counter, CRC-8 with polynomial x^8+x^2+x+1 and
// the K28.5 comma as the control character.
package cmx_pkg;

  // ---------------- backplane input ----------------
  localparam int unsigned NUM_INPUTS     = 16;  // processor inputs per crate
  localparam int unsigned IN_LINES       = 24;  // data lines per input, 160 Mbps
  localparam int unsigned IN_WORD_BITS   = 96;  // bits per input per bunch crossing
  localparam int unsigned TOBS_PER_INPUT = 4;   // jet TOB slots in a 96-bit word

  // One jet TOB as carried on the backplane (22 bits, et_large in the LSBs).
  typedef struct packed {
    logic [2:0] coord;     // local coordinate inside the module
    logic [8:0] et_small;  // small-window transverse energy
    logic [9:0] et_large;  // large-window transverse energy
  } jet_tob_t;

  localparam int unsigned JET_TOB_BITS = $bits(jet_tob_t);
  // Word layout: slot i in bits [22i+21:22i], presence flags in [91:88],
  // [94:92] spare, bit 95 odd parity over the whole word.
  localparam int unsigned PRESENCE_LSB = TOBS_PER_INPUT * JET_TOB_BITS;  // 88
  localparam int unsigned PARITY_BIT   = IN_WORD_BITS - 1;               // 95

  // ---------------- decoder / adder ----------------
  localparam int unsigned NUM_THR   = 25;  // jet thresholds
  localparam int unsigned THR_BITS  = 10;  // threshold value width (ET counts)
  localparam int unsigned MULT_BITS = 3;   // saturating multiplicity per threshold
  localparam int unsigned MAX_TOPO_TOBS = 32;
  localparam int unsigned TOB_CNT_BITS  = 7;  // 0..64 non-empty TOBs

  // TOB as sent to L1Topo: source module number added to the backplane TOB.
  typedef struct packed {
    logic [3:0] jem;
    jet_tob_t   tob;
  } topo_tob_t;
  localparam int unsigned TOPO_TOB_BITS = $bits(topo_tob_t);  // 26

  typedef logic [MULT_BITS-1:0] mult_t;

  // ---------------- L1Topo transmitter ----------------
  localparam int unsigned NUM_GTX        = 24;   // GTX transmitters
  localparam int unsigned GTX_GROUP      = 12;   // transmitters per 320 MHz domain
  localparam int unsigned FRAME_BITS     = 128;  // bits per GTX per bunch crossing
  localparam int unsigned CRC_BITS       = 8;
  localparam int unsigned PAYLOAD_BITS   = FRAME_BITS - CRC_BITS;  // 120
  localparam int unsigned USER_W         = 16;   // GTX user data width
  localparam int unsigned WORDS_PER_BC   = FRAME_BITS / USER_W;    // 8 words at 320 MHz
  localparam logic [7:0]  K28_5          = 8'hBC;
  localparam logic [7:0]  CRC_POLY       = 8'h07;
  localparam int unsigned BCID_BITS      = 12;

  // ---------------- G-Link readout ----------------
  localparam int unsigned GLINK_LINES = 20;

  // CRC-8 (polynomial CRC_POLY, MSB first) of one byte appended to crc.
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] data);
    logic [7:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[7] ^ data[i]) c = {c[6:0], 1'b0} ^ CRC_POLY;
      else                c = {c[6:0], 1'b0};
    end
    return c;
  endfunction

endpackage
