// cmx_top: the CMX (jet type) firmware, base function FPGA next to the board
// support FPGA.
//
// Base function FPGA, real-time path at the 40.08 MHz bunch-crossing rate:
//   input_module  16 processor inputs, 24 lines at 160 Mbps each with an 80 MHz
//                 forwarded clock, demultiplexed to 16 x 96 bits in the system
//                 domain, parity checked;
//   jet_decoder   25 threshold multiplicities and up to 32 packed non-empty TOBs,
//                 one cycle;
//   jet_adder     crate or system merging of the multiplicities towards the CTP,
//                 with the crate-to-system cable;
//   jet_encoder   TOBs and bunch counter into the 24 L1Topo payloads;
//   topo_data_tx  24 streams serialized at 320.64 MHz with control characters
//                 and CRC, moved into two GTX clock domains;
//   glink_tx x2   DAQ readout (the 16 input words) and RoI readout (the TOBs) on
//                 L1A, emulated G-Link framing.
// The bunch counter counts 0..3563 and restarts on bcr. Thresholds and the
// crate/system mode come in as ports (their VME registers in the base FPGA are
// not part of this design). GTX transceivers, IODELAY elements and clock
// managers are FPGA primitives outside this RTL: the GTX user data ports, the
// raw backplane lines and the generated clocks are ports of this module.
// Board support FPGA: bspt_fpga with its own clock and VME, I2C, TTCDec, System
// ACE and LVDS pins, side by side with the base FPGA.
// Latency from system-domain input word to payload: 2 clk40 cycles (decoder,
// encoder); to the CTP output: 2 cycles (decoder, adder).
module cmx_top
  import cmx_pkg::*;
(
  // ---------------- base FPGA clocks and reset ----------------
  input  logic                               clk40,      // system clock from TTC
  input  logic                               clk320,     // 8 x clk40, same phase source
  input  logic [1:0]                         gtx_clk,    // TXUSRCLK of the two GTX domains
  input  logic                               rst_n,      // released synchronously to clk40
  // backplane
  input  logic [NUM_INPUTS-1:0]              bp_clk80,
  input  logic [NUM_INPUTS-1:0][IN_LINES-1:0] bp_data,
  // TTC
  input  logic                               bcr,        // bunch counter reset
  input  logic                               l1a,
  // configuration
  input  logic [NUM_THR-1:0][THR_BITS-1:0]   thr_value,
  input  logic [NUM_THR-1:0]                 thr_small,
  input  logic                               is_system,
  input  logic                               parity_clear,
  // crate-to-system cable and CTP
  output mult_t [NUM_THR-1:0]                cable_out,
  output logic                               cable_out_par,
  input  mult_t [NUM_THR-1:0]                cable_in,
  input  logic                               cable_in_par,
  output mult_t [NUM_THR-1:0]                ctp_mult,
  output logic                               adder_error,
  // L1Topo GTX user ports
  output logic [NUM_GTX-1:0][USER_W-1:0]     gtx_txdata,
  output logic [NUM_GTX-1:0][1:0]            gtx_txcharisk,
  output logic [NUM_GTX-1:0]                 gtx_txvalid,
  output logic                               gtx_fifo_error,
  // G-Link readout (DAQ and RoI)
  output logic [GLINK_LINES-1:0]             daq_data,
  output logic                               daq_dav,
  output logic [GLINK_LINES-1:0]             roi_data,
  output logic                               roi_dav,
  output logic                               l1a_lost,
  // monitoring
  output logic [NUM_INPUTS-1:0][7:0]         parity_err_count,
  output logic [BCID_BITS-1:0]               bcid,
  // ---------------- board support FPGA ----------------
  input  logic                               bspt_clk,
  input  logic                               bspt_rst_n,
  input  logic [4:0]                         ga,
  input  logic [23:1]                        vme_addr,
  input  logic                               vme_as_n,
  input  logic                               vme_ds_n,
  input  logic                               vme_write_n,
  input  logic [15:0]                        vme_d_in,
  output logic [15:0]                        vme_d_out,
  output logic                               vme_buf_oe_n,
  output logic                               vme_buf_dir,
  output logic                               vme_dtack_n,
  input  logic [15:0]                        status1_in,
  input  logic [15:0]                        status2_in,
  output logic [15:0]                        module_ctrl,
  output logic [15:0]                        module_resets,
  input  logic [7:0]                         bf_lvds_req,
  input  logic [7:0]                         tp_lvds_req,
  output logic [7:0]                         lvds_dir,
  output logic [5:0]                         i2c_scl_oe,
  output logic [5:0]                         i2c_sda_oe,
  input  logic [5:0]                         i2c_scl_i,
  input  logic [5:0]                         i2c_sda_i,
  output logic [15:0]                        ttc_ctrl,
  input  logic [15:0]                        ttc_status,
  input  logic [7:0]                         ttc_brcst,
  input  logic                               ttc_brcst_str,
  input  logic [3:0]                         ttc_dq,
  input  logic                               ttc_dout_str,
  output logic [6:0]                         ace_mpa,
  output logic [15:0]                        ace_mpd_o,
  input  logic [15:0]                        ace_mpd_i,
  output logic                               ace_mpd_oe,
  output logic                               ace_mpce_n,
  output logic                               ace_mpwe_n,
  output logic                               ace_mpoe_n,
  output logic [3:0]                         leds
);

  // ---------------- input ----------------
  logic [NUM_INPUTS-1:0][IN_WORD_BITS-1:0] in_words;
  logic [NUM_INPUTS-1:0]                   in_perr;

  input_module u_input (
    .clk40(clk40), .rst_n(rst_n), .clk80(bp_clk80), .din(bp_data),
    .err_clear(parity_clear), .data(in_words), .parity_err(in_perr),
    .err_count(parity_err_count)
  );

  // ---------------- bunch counter ----------------
  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n)                        bcid <= '0;
    else if (bcr || bcid == 12'd3563)  bcid <= '0;
    else                               bcid <= bcid + 1'b1;

  // ---------------- decoder ----------------
  mult_t     [NUM_THR-1:0]       dec_mult;
  logic                          dec_perr;
  topo_tob_t [MAX_TOPO_TOBS-1:0] dec_tobs;
  logic [TOB_CNT_BITS-1:0]       dec_cnt;
  logic                          dec_ovf;

  jet_decoder u_decoder (
    .clk(clk40), .in_data(in_words), .in_parity_err(in_perr),
    .thr_value(thr_value), .thr_small(thr_small),
    .mult(dec_mult), .parity_err(dec_perr), .tobs(dec_tobs),
    .tob_count(dec_cnt), .overflow(dec_ovf)
  );

  // bunch counter of the crossing the decoder outputs belong to
  logic [BCID_BITS-1:0] bcid_d;
  always_ff @(posedge clk40) bcid_d <= bcid;

  // ---------------- adder ----------------
  jet_adder #(.N_REMOTE(1)) u_adder (
    .clk(clk40), .is_system(is_system), .local_mult(dec_mult), .local_err(dec_perr),
    .cable_out(cable_out), .cable_out_par(cable_out_par),
    .cable_in(cable_in), .cable_in_par(cable_in_par),
    .ctp_mult(ctp_mult), .error(adder_error)
  );

  // ---------------- L1Topo path ----------------
  logic [NUM_GTX-1:0][PAYLOAD_BITS-1:0] payload;

  jet_encoder u_encoder (
    .clk(clk40), .tobs(dec_tobs), .tob_count(dec_cnt), .overflow(dec_ovf),
    .bcid(bcid_d), .payload(payload)
  );

  topo_data_tx u_topo_tx (
    .clk40(clk40), .clk320(clk320), .rst_n(rst_n), .payload(payload),
    .gtx_clk(gtx_clk), .txdata(gtx_txdata), .txcharisk(gtx_txcharisk),
    .tx_valid(gtx_txvalid), .fifo_error(gtx_fifo_error)
  );

  // ---------------- readout ----------------
  localparam int unsigned ROI_BITS = MAX_TOPO_TOBS * TOPO_TOB_BITS + BCID_BITS + 1 + TOB_CNT_BITS;
  logic lost_daq, lost_roi, busy_daq, busy_roi;

  glink_tx #(.DATA_BITS(NUM_INPUTS * IN_WORD_BITS)) u_glink_daq (
    .clk(clk40), .rst_n(rst_n), .l1a(l1a), .data(in_words),
    .gl_data(daq_data), .gl_dav(daq_dav), .busy(busy_daq), .l1a_lost(lost_daq)
  );

  glink_tx #(.DATA_BITS(ROI_BITS)) u_glink_roi (
    .clk(clk40), .rst_n(rst_n), .l1a(l1a), .data({dec_cnt, dec_ovf, bcid_d, dec_tobs}),
    .gl_data(roi_data), .gl_dav(roi_dav), .busy(busy_roi), .l1a_lost(lost_roi)
  );

  assign l1a_lost = lost_daq | lost_roi;

  logic unused;
  assign unused = busy_daq ^ busy_roi;

  // ---------------- board support FPGA ----------------
  bspt_fpga u_bspt (
    .clk(bspt_clk), .rst_n(bspt_rst_n), .ga(ga),
    .vme_addr(vme_addr), .vme_as_n(vme_as_n), .vme_ds_n(vme_ds_n), .vme_write_n(vme_write_n),
    .vme_d_in(vme_d_in), .vme_d_out(vme_d_out), .vme_buf_oe_n(vme_buf_oe_n),
    .vme_buf_dir(vme_buf_dir), .vme_dtack_n(vme_dtack_n),
    .status1_in(status1_in), .status2_in(status2_in),
    .module_ctrl(module_ctrl), .module_resets(module_resets),
    .bf_lvds_req(bf_lvds_req), .tp_lvds_req(tp_lvds_req), .lvds_dir(lvds_dir),
    .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe), .scl_i(i2c_scl_i), .sda_i(i2c_sda_i),
    .ttc_ctrl(ttc_ctrl), .ttc_status(ttc_status), .ttc_brcst(ttc_brcst),
    .ttc_brcst_str(ttc_brcst_str), .ttc_dq(ttc_dq), .ttc_dout_str(ttc_dout_str),
    .ace_mpa(ace_mpa), .ace_mpd_o(ace_mpd_o), .ace_mpd_i(ace_mpd_i), .ace_mpd_oe(ace_mpd_oe),
    .ace_mpce_n(ace_mpce_n), .ace_mpwe_n(ace_mpwe_n), .ace_mpoe_n(ace_mpoe_n), .leds(leds)
  );

endmodule
