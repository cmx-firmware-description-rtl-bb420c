// input_channel: capture of one processor input from the backplane.
//
// A processor module sends 24 data lines at 160 Mbps together with an 80 MHz
// clock whose edges sit in the middle of the data windows. The four 24-bit
// words of one bunch crossing (d0..d3) are captured on both edges of the
// forwarded clock, the way the IOB double-data-rate registers do it: d0 and d2 on
// the rising edge, d1 and d3 on the falling edge. At every rising edge the last
// rising/falling pair is available as a 48-bit word at 80 Mbps. Which pair is the
// first one of the crossing is decided from the phase of the system clock: the
// level of clk40 seen at the forwarded clock's rising edge (SECOND_PAIR_LEVEL)
// marks the edge at which the second pair is complete. Then the 96-bit word
// {d3,d2,d1,d0} is formed in the forwarded-clock domain, where it stays stable
// for 25 ns, and is taken over by the system clock register data96.
//
// Timing: with the first word arriving at t0, the 96-bit word is complete at
// t0+28.1 ns; the system register picks it up at the first clk40 rising edge
// after that (about 35 ns after t0 when the system clock lags the slowest input
// as described). The programmable input delay elements (IODELAY) are outside
// this module. The phase relation of the two clocks is fixed by the board, so no
// synchronizer is used on the clock-domain crossing; the phase must leave a
// positive set-up margin at the clk40 edge.
// Following the description: DDR capture, 48-bit then 96-bit demultiplexing,
// pair order from the clock phase, capture into the system domain. Own choices:
// bit order of the 96-bit word and the SECOND_PAIR_LEVEL convention.
module input_channel #(
  parameter int unsigned LINES = 24,
  parameter bit SECOND_PAIR_LEVEL = 1'b0   // clk40 level seen when the 2nd pair completes
) (
  input  logic               clk80,      // forwarded 80 MHz clock
  input  logic [LINES-1:0]   din,        // 160 Mbps data lines
  input  logic               clk40,      // system clock (also sampled as a phase reference)
  output logic [4*LINES-1:0] data96,     // system domain, {d3,d2,d1,d0}
  output logic [4*LINES-1:0] data96_fwd  // forwarded-clock domain word (for observation)
);

  logic [LINES-1:0]   q_rise, q_fall;   // DDR capture registers
  logic [2*LINES-1:0] pair_prev;        // previous 48-bit pair (80 Mbps)

  always_ff @(posedge clk80) q_rise <= din;
  always_ff @(negedge clk80) q_fall <= din;

  always_ff @(posedge clk80) begin
    pair_prev <= {q_fall, q_rise};
    if (clk40 == SECOND_PAIR_LEVEL)
      data96_fwd <= {q_fall, q_rise, pair_prev};
  end

  always_ff @(posedge clk40) data96 <= data96_fwd;


endmodule
