// lowlat_fifo: small dual-clock FIFO for moving a bytestream into a GTX clock
// domain with low latency.
//
// A DEPTH-entry memory written in the write clock and read in the read clock
// (a dual-port RAM), with Gray-coded pointers that cross each way through two
// flip-flops. The write side stores every cycle in which wr_en is set; a write
// into a full FIFO is dropped and sets the sticky overflow flag. The read side
// waits until START_LEVEL words are present, then reads one word every cycle
// while the FIFO is not empty; rd_valid marks each word. Because both sides
// run at the same frequency (320.64 MHz) the level stays constant after the
// start, so the added latency is about START_LEVEL words plus the pointer
// synchronizers.
// From the description: custom low-latency FIFOs in dual-port RAM, one per
// bytestream. Depth, start level and the overflow flag are this design's own.
module lowlat_fifo #(
  parameter int unsigned WIDTH       = 18,
  parameter int unsigned AW          = 3,   // DEPTH = 2**AW
  parameter int unsigned START_LEVEL = 2
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             underflow
);

  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic full;
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en) begin
        if (full) overflow <= 1'b1;
        else begin
          wbin  <= wbin + 1'b1;
          wgray <= bin2gray(wbin + 1'b1);
        end
      end
    end
  end

  // ---------------- read side ----------------
  logic [AW:0] level;
  logic        empty, started;
  assign empty = (rgray == wgray_r2);
  assign level = gray2bin(wgray_r2) - rbin;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
      started <= 1'b0; rd_valid <= 1'b0; rd_data <= '0; underflow <= 1'b0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (!started && level >= (AW+1)'(START_LEVEL)) started <= 1'b1;
      rd_valid <= 1'b0;
      if (started) begin
        if (!empty) begin
          rd_data  <= mem[rbin[AW-1:0]];
          rd_valid <= 1'b1;
          rbin     <= rbin + 1'b1;
          rgray    <= bin2gray(rbin + 1'b1);
        end else underflow <= 1'b1;
      end
    end
  end

endmodule
