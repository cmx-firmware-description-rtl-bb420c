// topo_data_tx_tb: all 24 streams at their default size. clk40 and clk320 are
// phase locked (8 clk320 periods per crossing); the two GTX domains run at the
// clk320 frequency with other phases. Random payloads, with a share of all-zero
// ones, change every crossing. In each GTX domain the words of every stream are
// cut into frames of eight and compared with the expected words (payload, CRC,
// K28.5 for zero payloads). Also checked: no FIFO error, and the latency from
// the crossing's clk40 edge to the frame's first GTX word (below 1.5 crossings).
module topo_data_tx_tb;
  import cmx_pkg::*;
  localparam int NBC = 60;
  logic clk40 = 1'b0, clk320 = 1'b0, rst_n = 1'b0;
  logic [1:0] gtx_clk = '0;
  logic [23:0][119:0] payload = '0;
  logic [23:0][15:0] txdata;
  logic [23:0][1:0]  txk;
  logic [23:0]       txv;
  logic              ferr;
  logic [23:0][119:0] pl [NBC + 4];
  longint t_bc [NBC + 4];
  int checks = 0, failures = 0, n_idle = 0, n_data = 0, maxlat = 0;

  topo_data_tx dut (.clk40(clk40), .clk320(clk320), .rst_n(rst_n), .payload(payload),
    .gtx_clk(gtx_clk), .txdata(txdata), .txcharisk(txk), .tx_valid(txv), .fifo_error(ferr));

  always #40 clk40 = ~clk40;
  always #5  clk320 = ~clk320;
  initial begin #3; forever #5 gtx_clk[0] = ~gtx_clk[0]; end
  initial begin #7; forever #5 gtx_clk[1] = ~gtx_clk[1]; end

  function automatic logic [7:0] ref_crc(logic [119:0] p);
    logic [7:0] c = '0;
    for (int i = 0; i < 120; i++) begin      // bytes low first, bits MSB first
      logic fb;
      fb = c[7] ^ p[8*(i/8) + 7 - (i%8)];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  function automatic logic [17:0] exp_word(logic [119:0] p, int w);
    if (p == '0) return (w < 7) ? {2'b11, 16'hBCBC} : {2'b01, ref_crc(p), 8'hBC};
    return (w < 7) ? {2'b00, p[16*w +: 16]} : {2'b00, ref_crc(p), p[119:112]};
  endfunction

  initial begin
    for (int n = 0; n < NBC + 4; n++)
      for (int g = 0; g < 24; g++)
        pl[n][g] = ($urandom % 4 == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk40) rst_n = 1'b1;
    for (int n = 0; n < NBC + 4; n++) begin
      @(posedge clk40);
      t_bc[n] = $time;
      #1 payload = pl[n];
    end
  end

  for (genvar g = 0; g < 24; g++) begin : g_mon
    int nw = 0;
    always @(posedge gtx_clk[g / 12]) if (txv[g] && rst_n) begin
      #1;
      if (nw / 8 < NBC) begin
        checks++;
        if ({txk[g], txdata[g]} !== exp_word(pl[nw/8][g], nw % 8)) begin
          failures++;
          $display("FAIL stream %0d frame %0d word %0d: %h exp %h", g, nw/8, nw%8, {txk[g], txdata[g]}, exp_word(pl[nw/8][g], nw%8));
        end
        if (nw % 8 == 0) begin
          if (int'($time - t_bc[nw/8]) > maxlat) maxlat = int'($time - t_bc[nw/8]);
          if (pl[nw/8][g] == '0) n_idle++; else n_data++;
        end
      end
      nw++;
    end
  end

  initial begin
    #(80 * (NBC + 3));
    checks++;
    if (ferr || maxlat > 120 || n_idle == 0 || n_data == 0 || checks < 24 * 8 * (NBC - 2)) begin
      failures++; $display("FAIL fifo error %b latency %0d idle %0d data %0d checks %0d", ferr, maxlat, n_idle, n_data, checks);
    end
    $display("latency %0d (clk40 period 80)", maxlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(80 * (NBC + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
