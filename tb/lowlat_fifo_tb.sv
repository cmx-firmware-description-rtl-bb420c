// lowlat_fifo_tb: two FIFOs fed with a counting sequence, one word per write
// clock. FIFO A reads with a clock of the same frequency but another phase (the
// GTX case): every word must come out once, in order, without gaps, within a
// bounded latency, and no overflow or underflow may occur. FIFO B reads with a
// slower clock: it must flag overflow, and what it delivers must still be an
// increasing subsequence of what was written.
module lowlat_fifo_tb;
  logic wclk = 1'b0, rclk_a = 1'b0, rclk_b = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [17:0] wdata = '0, rd_a, rd_b;
  logic va, vb, ovf_a, ovf_b, unf_a, unf_b;
  int checks = 0, failures = 0;
  longint t_wr [1024];

  lowlat_fifo #(.WIDTH(18), .AW(3), .START_LEVEL(2)) dut_a (
    .wclk(wclk), .wrst_n(rst_n), .wr_en(wr_en), .wr_data(wdata), .overflow(ovf_a),
    .rclk(rclk_a), .rrst_n(rst_n), .rd_data(rd_a), .rd_valid(va), .underflow(unf_a));
  lowlat_fifo #(.WIDTH(18), .AW(3), .START_LEVEL(2)) dut_b (
    .wclk(wclk), .wrst_n(rst_n), .wr_en(wr_en), .wr_data(wdata), .overflow(ovf_b),
    .rclk(rclk_b), .rrst_n(rst_n), .rd_data(rd_b), .rd_valid(vb), .underflow(unf_b));

  always #5 wclk = ~wclk;
  initial begin #3; forever #5 rclk_a = ~rclk_a; end
  always #7 rclk_b = ~rclk_b;

  always @(posedge wclk) if (rst_n) begin
    wr_en <= 1'b1;
    if (wr_en) wdata <= wdata + 1'b1;
    if (wdata < 1024) t_wr[wdata] = $time;
  end

  int next_a = 0, maxlat = 0, last_b = -1, nb = 0;
  always @(posedge rclk_a) if (va && rst_n) begin
    checks++;
    if (int'(rd_a) != next_a) begin failures++; $display("FAIL A: %0d exp %0d", rd_a, next_a); end
    if (rd_a < 1024 && int'($time - t_wr[rd_a]) > maxlat) maxlat = int'($time - t_wr[rd_a]);
    next_a = int'(rd_a) + 1;
  end
  always @(posedge rclk_b) if (vb && rst_n) begin
    checks++;
    if (int'(rd_b) <= last_b) begin failures++; $display("FAIL B order"); end
    last_b = int'(rd_b); nb++;
  end

  initial begin
    #20 rst_n = 1'b1;
    #8000;
    checks++;
    if (next_a < 700 || ovf_a || unf_a || maxlat > 80) begin
      failures++; $display("FAIL A: words %0d ovf %b unf %b latency %0d", next_a, ovf_a, unf_a, maxlat);
    end
    checks++;
    if (!ovf_b || nb < 100) begin failures++; $display("FAIL B: ovf %b words %0d", ovf_b, nb); end
    $display("latency A %0d time units", maxlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
