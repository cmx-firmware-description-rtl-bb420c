// topo_stream_ser_tb: a sequence of 120-bit payloads, a third of them all
// zero (quiet events), one crossing every 8 clocks. Each frame must appear as
// eight words starting one clock after bc_start: payload words 0..6, then the
// last payload byte and the CRC-8 of all 120 payload bits, with K28.5
// characters and the charisk flags in place of data for zero payloads. The CRC
// is computed here bit-serially over the transmitted bit order.
module topo_stream_ser_tb;
  import cmx_pkg::*;
  localparam int NF = 100;
  logic clk = 1'b0, rst_n = 1'b0, bc_start = 1'b0;
  logic [119:0] payload = '0;
  logic [15:0] txd;
  logic [1:0]  txk;
  logic [119:0] frames [NF];
  int checks = 0, failures = 0, n_idle = 0, n_data = 0;

  topo_stream_ser dut (.clk(clk), .rst_n(rst_n), .bc_start(bc_start), .payload(payload), .txd(txd), .txk(txk));

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_crc(logic [119:0] p);
    logic [7:0] c = '0;
    for (int byt = 0; byt < 15; byt++)
      for (int b = 7; b >= 0; b--) begin
        logic fb;
        fb = c[7] ^ p[8*byt + b];
        c = {c[6:0], 1'b0};
        if (fb) c = c ^ 8'h07;
      end
    return c;
  endfunction

  // cycle counter and output record (sampled after each rising edge)
  int cyc = 0;
  logic [17:0] rec [NF * 12 + 100];
  int start_cyc [NF];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    #1 rec[cyc - 1] = {txk, txd};
  end

  function automatic logic [17:0] exp_word(int f, int w);
    if (frames[f] == '0)
      return (w < 7) ? {2'b11, 16'hBCBC} : {2'b01, ref_crc(frames[f]), 8'hBC};
    return (w < 7) ? {2'b00, frames[f][16*w +: 16]} : {2'b00, ref_crc(frames[f]), frames[f][119:112]};
  endfunction

  initial begin
    for (int f = 0; f < NF; f++)
      frames[f] = (f % 3 == 1) ? '0 : {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // groups of five back-to-back crossings separated by a gap of 3 clocks
    for (int f = 0; f < NF; f++) begin
      payload = frames[f];
      bc_start = 1'b1;
      start_cyc[f] = cyc;          // the rising edge that samples bc_start
      @(negedge clk) bc_start = 1'b0;
      repeat (7) @(negedge clk);
      if (f % 5 == 4) repeat (3) @(negedge clk);
    end
    repeat (12) @(negedge clk);
    checks++;
    if (rec[2] !== {2'b11, 16'hBCBC}) begin failures++; $display("FAIL no idle before start"); end
    for (int f = 0; f < NF; f++) begin
      for (int w = 0; w < 8; w++) begin
        checks++;
        if (rec[start_cyc[f] + 1 + w] !== exp_word(f, w)) begin
          failures++; $display("FAIL frame %0d word %0d: %h exp %h", f, w, rec[start_cyc[f]+1+w], exp_word(f, w));
        end
      end
      if (f % 5 == 4) begin
        checks++;
        if (rec[start_cyc[f] + 9] !== {2'b11, 16'hBCBC}) begin failures++; $display("FAIL no idle after %0d", f); end
      end
      if (frames[f] == '0) n_idle++; else n_data++;
    end
    checks++;
    if (n_idle == 0 || n_data == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NF * 200 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
