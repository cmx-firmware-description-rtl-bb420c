// glink_tx: emulated G-Link readout framing for the DAQ or RoI link.
//
// On an L1A the readout data of the crossing (DATA_BITS wide, supplied already
// aligned to the accepted crossing) is copied into 20 shift registers, one per
// G-Link user data line; line l holds data bits l, l+20, l+40, ... so that the
// 20-bit word sent in cycle k is data[20k+19:20k] (zero-padded at the end).
// The sequence on the link, one 20-bit word per clock:
//   SHIFT   BITS_PER_LINE cycles, DAV high, one bit per line per cycle;
//   PARITY  1 cycle, DAV high, each line sends its odd parity bit (the line's
//           data bits plus this bit hold an odd number of ones);
//   GAP     GAP_CYCLES (at least 1) cycles, DAV low, data lines low: the
//           quiescent state, which is also the idle state.
// An L1A that arrives while a frame is in progress cannot be taken: it is
// dropped and reported by a one-cycle l1a_lost pulse.
// The word rate is one per clk cycle; at 960 Mbps with 24-bit G-Link frames
// this is 40 MHz. Serialization and encoding of the G-Link line code are done
// by the GTX transmitter outside this module.
// From the description: 20 user data bits, shift registers per line loaded on
// L1A, DAV asserted while data is sent, odd parity appended per line, DAV
// deasserted and at least one quiescent cycle. Own choices: bit-to-line mapping,
// no queueing of L1As.
module glink_tx
  import cmx_pkg::*;
#(
  parameter int unsigned DATA_BITS  = NUM_INPUTS * IN_WORD_BITS,  // 1536 for DAQ
  parameter int unsigned GAP_CYCLES = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   l1a,
  input  logic [DATA_BITS-1:0]   data,
  output logic [GLINK_LINES-1:0] gl_data,
  output logic                   gl_dav,
  output logic                   busy,
  output logic                   l1a_lost
);

  localparam int unsigned BITS_PER_LINE = (DATA_BITS + GLINK_LINES - 1) / GLINK_LINES;
  localparam int unsigned PAD_BITS      = BITS_PER_LINE * GLINK_LINES;
  localparam int unsigned CW            = $clog2(BITS_PER_LINE + GAP_CYCLES + 1);

  typedef enum logic [1:0] {S_GAP, S_IDLE, S_SHIFT, S_PARITY} state_t;
  state_t state;

  logic [GLINK_LINES-1:0][BITS_PER_LINE-1:0] sr;
  logic [GLINK_LINES-1:0]                    par;
  logic [CW-1:0]                             cnt;
  logic [PAD_BITS-1:0]                       padded;

  assign padded = PAD_BITS'(data);
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sr       <= '0;
      par      <= '0;
      cnt      <= '0;
      gl_data  <= '0;
      gl_dav   <= 1'b0;
      l1a_lost <= 1'b0;
    end else begin
      l1a_lost <= l1a && (state != S_IDLE);
      case (state)
        S_IDLE: begin
          gl_data <= '0;
          gl_dav  <= 1'b0;
          if (l1a) begin
            for (int l = 0; l < GLINK_LINES; l++)
              for (int k = 0; k < BITS_PER_LINE; k++)
                sr[l][k] <= padded[k*GLINK_LINES + l];
            par   <= '1;      // odd parity: start from 1
            cnt   <= '0;
            state <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          for (int l = 0; l < GLINK_LINES; l++) begin
            gl_data[l] <= sr[l][0];
            par[l]     <= par[l] ^ sr[l][0];
            sr[l]      <= sr[l] >> 1;
          end
          gl_dav <= 1'b1;
          cnt    <= cnt + 1'b1;
          if (cnt == CW'(BITS_PER_LINE - 1)) state <= S_PARITY;
        end
        S_PARITY: begin
          gl_data <= par;
          gl_dav  <= 1'b1;
          cnt     <= '0;
          state   <= S_GAP;
        end
        default: begin  // S_GAP
          gl_data <= '0;
          gl_dav  <= 1'b0;
          cnt     <= cnt + 1'b1;
          if (cnt == CW'(GAP_CYCLES - 1)) state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
