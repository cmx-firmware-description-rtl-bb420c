// jet_encoder: forms the L1Topo transmit vector from the decoded jet TOBs.
//
// The decoder's TOB array, its count and overflow flag and the bunch counter of
// the TTC logic are placed into one flat vector and registered together, so the
// bunch number and the TOBs of a crossing leave in the same register. The flat
// vector is cut into NUM_GTX payloads of 120 bits (the 128-bit GTX frame less
// its CRC byte); payload g is bits [120g+119:120g]. Layout of the flat vector:
//   [32*26-1:0]  TOB k in bits [26k+25:26k]
//   [843:832]    bunch counter
//   [844]        overflow
//   [851:845]    TOB count
//   rest         zero
// Because TOBs are packed from slot 0, quiet events leave the upper payloads
// all zero and the transmitter sends control characters there.
// From the description: renaming plus one register that also takes the bunch
// counter. The bit layout is this implementation's own.
module jet_encoder
  import cmx_pkg::*;
#(
  parameter int unsigned N_GTX = NUM_GTX
) (
  input  logic                               clk,
  input  topo_tob_t [MAX_TOPO_TOBS-1:0]      tobs,
  input  logic [TOB_CNT_BITS-1:0]            tob_count,
  input  logic                               overflow,
  input  logic [BCID_BITS-1:0]               bcid,
  output logic [N_GTX-1:0][PAYLOAD_BITS-1:0] payload
);

  localparam int unsigned TOB_FIELD = MAX_TOPO_TOBS * TOPO_TOB_BITS;  // 832
  localparam int unsigned FLAT_BITS = N_GTX * PAYLOAD_BITS;
  localparam int unsigned USED_BITS = TOB_FIELD + BCID_BITS + 1 + TOB_CNT_BITS;

  logic [FLAT_BITS-1:0] flat;

  always_comb begin
    flat = '0;
    flat[USED_BITS-1:0] = {tob_count, overflow, bcid, tobs};
  end

  always_ff @(posedge clk) payload <= flat;

endmodule
