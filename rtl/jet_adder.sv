// jet_adder: crate-level and system-level merging of jet multiplicities.
//
// The same module serves both roles of a CMX, chosen by is_system:
//  * crate part: the local multiplicities from the decoder are registered and
//    sent on the crate-to-system cable with one odd parity bit over the word;
//  * system part: the multiplicities received from the other crate (cable,
//    N_REMOTE of them) are checked for odd parity and added per threshold to the
//    local ones with saturation at the field maximum.
// ctp_mult carries the system sum on a system CMX and the local multiplicities
// on a crate CMX. Each path is one register stage at 40.08 MHz. An error flag
// marks a cable word with bad parity or a local input parity error; the sum is
// still formed.
// From the description: two parts, crate and system merging at 40.08 MHz,
// output towards the CTP. Own choices: the mode input, the cable parity, the
// saturating sum and the single register stage.
module jet_adder
  import cmx_pkg::*;
#(
  parameter int unsigned N_THR    = NUM_THR,
  parameter int unsigned N_REMOTE = 1
) (
  input  logic                               clk,
  input  logic                               is_system,
  input  mult_t [N_THR-1:0]                  local_mult,
  input  logic                               local_err,
  // crate-to-system cable, transmit side
  output mult_t [N_THR-1:0]                  cable_out,
  output logic                               cable_out_par,
  // cable(s) received from the other crate(s)
  input  mult_t [N_REMOTE-1:0][N_THR-1:0]    cable_in,
  input  logic  [N_REMOTE-1:0]               cable_in_par,
  // towards the Central Trigger Processor
  output mult_t [N_THR-1:0]                  ctp_mult,
  output logic                               error
);

  mult_t [N_THR-1:0] sum_c;
  logic              cable_bad;

  always_comb begin
    cable_bad = 1'b0;
    for (int r = 0; r < N_REMOTE; r++)
      if (~(^{cable_in[r], cable_in_par[r]})) cable_bad = 1'b1;
    for (int t = 0; t < N_THR; t++) begin
      logic [MULT_BITS+3:0] acc;
      acc = (MULT_BITS+4)'(local_mult[t]);
      for (int r = 0; r < N_REMOTE; r++) acc = acc + (MULT_BITS+4)'(cable_in[r][t]);
      sum_c[t] = (acc > (MULT_BITS+4)'({MULT_BITS{1'b1}})) ? '1 : acc[MULT_BITS-1:0];
    end
  end

  always_ff @(posedge clk) begin
    cable_out     <= local_mult;
    cable_out_par <= ~(^local_mult);
    ctp_mult      <= is_system ? sum_c : local_mult;
    error         <= local_err | (is_system & cable_bad);
  end

endmodule
