// input_module: backplane capture of all processor inputs of the crate.
//
// Holds one input_channel per processor input. Each channel has its own 80 MHz
// forwarded clock domain and delivers its 96-bit word in the system (clk40)
// domain. In the system domain every word is checked for odd parity (bit 95 of
// the word is chosen such that the 96 bits hold an odd number of ones); a word
// with even weight raises its parity_err flag in the same cycle the word is
// valid, and the flag is counted per input in a saturating error counter that a
// control interface can read and clear.
// The parity convention and the counters are choices of this implementation;
// the description only says that parity errors are detected.
module input_module
  import cmx_pkg::*;
#(
  parameter int unsigned N_IN = NUM_INPUTS,
  parameter bit SECOND_PAIR_LEVEL = 1'b0
) (
  input  logic                        clk40,
  input  logic                        rst_n,       // system domain, for the counters
  input  logic [N_IN-1:0]             clk80,       // forwarded clocks
  input  logic [N_IN-1:0][IN_LINES-1:0] din,
  input  logic                        err_clear,
  output logic [N_IN-1:0][IN_WORD_BITS-1:0] data,  // system domain words
  output logic [N_IN-1:0]             parity_err,
  output logic [N_IN-1:0][7:0]        err_count
);

  for (genvar i = 0; i < N_IN; i++) begin : g_ch
    input_channel #(.LINES(IN_LINES), .SECOND_PAIR_LEVEL(SECOND_PAIR_LEVEL)) u_ch (
      .clk80(clk80[i]), .din(din[i]), .clk40(clk40),
      .data96(data[i]), .data96_fwd()
    );

    assign parity_err[i] = ~(^data[i]);

    always_ff @(posedge clk40 or negedge rst_n) begin
      if (!rst_n)                               err_count[i] <= '0;
      else if (err_clear)                       err_count[i] <= '0;
      else if (parity_err[i] && err_count[i] != 8'hFF) err_count[i] <= err_count[i] + 8'd1;
    end
  end

endmodule
