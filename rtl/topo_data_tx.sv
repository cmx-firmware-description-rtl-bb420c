// topo_data_tx: data path to the 24 GTX transmitters towards L1Topo.
//
// The 24 payloads of 120 bits arrive in the 40.08 MHz system domain. A toggle
// flip-flop in that domain, seen through two clk320 flip-flops, marks the start
// of each crossing in the 320.64 MHz system domain (clk320 is derived from the
// same TTC clock, eight periods per crossing). Each payload is then serialized
// in parallel by its own topo_stream_ser into 16-bit words with control
// characters and CRC, and each bytestream crosses into its GTX clock domain
// through its own lowlat_fifo. Streams 0..11 go to the first GTX domain
// (gtx_clk[0]), streams 12..23 to the second (gtx_clk[1]); each domain serves
// the transmitters of three neighbouring quads sharing a reference clock.
// Outputs per stream are the GTX user data (16 bits) and charisk (2 bits), in
// the stream's GTX domain; the GTX transmitters themselves (8b/10b encoding,
// 20-bit internal width, TX buffer bypassed) are the FPGA's hard transceivers and
// are outside this module. rst_n must be released synchronously to clk40; it is
// also used asynchronously in the 320 MHz domains.
// From the description: 24 streams, 128 bits per crossing, serialization in the
// system domain, per-stream FIFOs, two 320.64 MHz GTX domains of 12.
module topo_data_tx
  import cmx_pkg::*;
#(
  parameter int unsigned N_GTX = NUM_GTX,
  parameter int unsigned GROUP = GTX_GROUP
) (
  input  logic                               clk40,
  input  logic                               clk320,
  input  logic                               rst_n,
  input  logic [N_GTX-1:0][PAYLOAD_BITS-1:0] payload,
  input  logic [(N_GTX+GROUP-1)/GROUP-1:0]   gtx_clk,     // TXUSRCLK per domain
  output logic [N_GTX-1:0][USER_W-1:0]       txdata,
  output logic [N_GTX-1:0][1:0]              txcharisk,
  output logic [N_GTX-1:0]                   tx_valid,
  output logic                               fifo_error   // any overflow/underflow (sticky)
);

  // crossing marker, clk40 -> clk320
  logic tog, tog_s1, tog_s2, bc_start;
  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) tog <= 1'b0; else tog <= ~tog;
  always_ff @(posedge clk320 or negedge rst_n)
    if (!rst_n) begin tog_s1 <= 1'b0; tog_s2 <= 1'b0; end
    else begin tog_s1 <= tog; tog_s2 <= tog_s1; end
  assign bc_start = tog_s1 ^ tog_s2;

  logic [N_GTX-1:0] ovf, unf;

  for (genvar g = 0; g < N_GTX; g++) begin : g_stream
    logic [USER_W-1:0] sd;
    logic [1:0]        sk;
    logic              wr_en;

    topo_stream_ser u_ser (
      .clk(clk320), .rst_n(rst_n), .bc_start(bc_start), .payload(payload[g]),
      .txd(sd), .txk(sk)
    );

    always_ff @(posedge clk320 or negedge rst_n)
      if (!rst_n) wr_en <= 1'b0; else if (bc_start) wr_en <= 1'b1;

    lowlat_fifo #(.WIDTH(USER_W + 2), .AW(3), .START_LEVEL(2)) u_fifo (
      .wclk(clk320), .wrst_n(rst_n), .wr_en(wr_en), .wr_data({sk, sd}), .overflow(ovf[g]),
      .rclk(gtx_clk[g / GROUP]), .rrst_n(rst_n),
      .rd_data({txcharisk[g], txdata[g]}), .rd_valid(tx_valid[g]), .underflow(unf[g])
    );
  end

  assign fifo_error = |ovf | |unf;

endmodule
