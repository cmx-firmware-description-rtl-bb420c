// topo_stream_ser: serializer of one L1Topo bytestream.
//
// Once per bunch crossing (bc_start, one clk320 cycle) a 120-bit payload is
// taken over and sent as eight 16-bit words at 320.64 MHz, i.e. 128 bits per
// crossing and 5.12 Gbps of user data per GTX. Word i (i = 0..6) carries payload
// bits [16i+15:16i]; word 7 carries payload bits [119:112] in its low byte and
// the CRC in its high byte. The CRC-8 (x^8+x^2+x+1, initial value 0, MSB first,
// low byte of a word first) runs over the 120 payload bits and is accumulated
// while the words go out. An all-zero payload (quiet event) is sent as K28.5
// control characters instead of data: words 0..6 are BC/BC with both charisk
// bits set and the low byte of word 7 is BC with charisk bit 0 set; the CRC
// byte (zero for a zero payload) still follows. Before the first crossing and
// whenever no crossing is running the stream idles with K28.5 characters.
// Timing: word 0 of a frame appears at txd one cycle after bc_start, word 7 in
// the cycle of the next bc_start.
// From the description: serialization in the system domain at 320 Mbps words,
// control characters for less busy events, CRC attached after serialization.
// Own choices: the CRC polynomial and position, and the rule "all-zero payload".
module topo_stream_ser
  import cmx_pkg::*;
(
  input  logic                    clk,        // 320.64 MHz system-domain clock
  input  logic                    rst_n,
  input  logic                    bc_start,
  input  logic [PAYLOAD_BITS-1:0] payload,
  output logic [USER_W-1:0]       txd,
  output logic [1:0]              txk
);

  logic [PAYLOAD_BITS-1:0] frame;
  logic [2:0]              idx;
  logic                    run;
  logic [7:0]              crc;

  logic                    empty;
  logic [USER_W-1:0]       word;
  logic [7:0]              crc_last;

  assign empty    = (frame == '0);
  assign word     = frame[16*idx +: 16];   // idx 0..6
  assign crc_last = crc8_byte(crc, frame[119:112]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '0;
      idx   <= '0;
      run   <= 1'b0;
      crc   <= '0;
      txd   <= {K28_5, K28_5};
      txk   <= 2'b11;
    end else begin
      if (!run) begin
        txd <= {K28_5, K28_5};
        txk <= 2'b11;
      end else if (idx != 3'd7) begin
        txd <= empty ? {K28_5, K28_5} : word;
        txk <= empty ? 2'b11 : 2'b00;
        crc <= crc8_byte(crc8_byte(crc, word[7:0]), word[15:8]);
      end else begin
        txd <= {crc_last, empty ? K28_5 : frame[119:112]};
        txk <= {1'b0, empty};
      end

      if (bc_start) begin
        frame <= payload;
        idx   <= '0;
        crc   <= '0;
        run   <= 1'b1;
      end else if (run) begin
        idx <= idx + 3'd1;
        if (idx == 3'd7) run <= 1'b0;
      end
    end
  end

endmodule
