// jet_decoder: real-time decoding of the jet TOBs of one crate.
//
// Input: the 16 x 96-bit words of the processor inputs in the system domain,
// each carrying up to four jet TOBs with presence flags (layout in cmx_pkg).
// Two outputs, both registered once, so results appear one 40 MHz cycle after
// the input word:
//  * for the adder: per threshold the number of present TOBs whose energy is
//    above the threshold, saturating at 7, plus the OR of the input parity errors;
//  * for the L1Topo encoder: the present (non-empty) TOBs packed without gaps
//    into at most 32 slots, in input-number then slot order, with their count and
//    an overflow flag when more than 32 were present (the extra ones are dropped).
// Threshold values come from control registers; thr_small selects per threshold
// whether the small-window or the large-window energy is compared.
// From the description: 16 x 96 bits in, 25 thresholds, up to 32 non-empty TOBs
// out, one-cycle latency. Own choices: TOB layout, strict "greater than"
// comparison, 3-bit saturation, the energy-window select, overflow handling.
module jet_decoder
  import cmx_pkg::*;
#(
  parameter int unsigned N_IN   = NUM_INPUTS,
  parameter int unsigned N_THR  = NUM_THR,
  parameter int unsigned MAX_OUT = MAX_TOPO_TOBS
) (
  input  logic                              clk,
  input  logic [N_IN-1:0][IN_WORD_BITS-1:0] in_data,
  input  logic [N_IN-1:0]                   in_parity_err,
  input  logic [N_THR-1:0][THR_BITS-1:0]    thr_value,
  input  logic [N_THR-1:0]                  thr_small,
  output mult_t [N_THR-1:0]                 mult,
  output logic                              parity_err,
  output topo_tob_t [MAX_OUT-1:0]           tobs,
  output logic [TOB_CNT_BITS-1:0]           tob_count,
  output logic                              overflow
);

  localparam int unsigned N_TOB = N_IN * TOBS_PER_INPUT;

  jet_tob_t [N_TOB-1:0] tob_all;
  logic     [N_TOB-1:0] present;

  always_comb begin
    for (int i = 0; i < N_IN; i++)
      for (int s = 0; s < TOBS_PER_INPUT; s++) begin
        tob_all[i*TOBS_PER_INPUT+s] = in_data[i][s*JET_TOB_BITS +: JET_TOB_BITS];
        present[i*TOBS_PER_INPUT+s] = in_data[i][PRESENCE_LSB+s];
      end
  end

  // multiplicities
  mult_t [N_THR-1:0] mult_c;
  always_comb begin
    for (int t = 0; t < N_THR; t++) begin
      mult_c[t] = '0;
      for (int k = 0; k < N_TOB; k++) begin
        logic [THR_BITS-1:0] et;
        et = thr_small[t] ? THR_BITS'(tob_all[k].et_small) : tob_all[k].et_large;
        if (present[k] && et > thr_value[t] && mult_c[t] != '1)
          mult_c[t] = mult_c[t] + 1'b1;
      end
    end
  end

  // compaction of the non-empty TOBs
  topo_tob_t [MAX_OUT-1:0]   tobs_c;
  logic [TOB_CNT_BITS-1:0]   cnt_c;
  always_comb begin
    tobs_c = '0;
    cnt_c  = '0;
    for (int k = 0; k < N_TOB; k++) begin
      if (present[k]) begin
        if (cnt_c < TOB_CNT_BITS'(MAX_OUT)) begin
          tobs_c[cnt_c[$clog2(MAX_OUT)-1:0]].jem = 4'(k / TOBS_PER_INPUT);
          tobs_c[cnt_c[$clog2(MAX_OUT)-1:0]].tob = tob_all[k];
        end
        cnt_c = cnt_c + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    mult       <= mult_c;
    parity_err <= |in_parity_err;
    tobs       <= tobs_c;
    tob_count  <= cnt_c;
    overflow   <= cnt_c > TOB_CNT_BITS'(MAX_OUT);
  end

endmodule
