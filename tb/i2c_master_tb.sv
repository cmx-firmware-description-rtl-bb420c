// i2c_master_tb: the master on an open-drain bus with two behavioural devices
// (0x50, and 0x28 which stretches the clock). Random register writes followed
// by read-backs must return what was written; a read of an untouched register
// returns the device's preset value; an access to an absent address must end
// with nack. The SCL period is checked against 4*DIV clocks.
module i2c_master_tb;
  localparam int DIV = 5;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, rw = 1'b0;
  logic [6:0] dev = '0;
  logic [7:0] rega = '0, wd = '0, rd;
  logic busy, done, nack, scl_oe, sda_oe;
  logic s0_sda, s0_scl, s1_sda, s1_scl;
  wire  scl = ~(scl_oe | s0_scl | s1_scl);
  wire  sda = ~(sda_oe | s0_sda | s1_sda);
  int checks = 0, failures = 0;

  i2c_master #(.DIV(DIV)) dut (.clk(clk), .rst_n(rst_n), .start(start), .rw(rw), .dev_addr(dev),
    .reg_addr(rega), .wdata(wd), .busy(busy), .done(done), .nack(nack), .rdata(rd),
    .scl_oe(scl_oe), .sda_oe(sda_oe), .scl_i(scl), .sda_i(sda));
  i2c_slave_model #(.ADDR(7'h50), .STRETCH(0))  s0 (.scl(scl), .sda(sda), .sda_oe(s0_sda), .scl_oe(s0_scl));
  i2c_slave_model #(.ADDR(7'h28), .STRETCH(73)) s1 (.scl(scl), .sda(sda), .sda_oe(s1_sda), .scl_oe(s1_scl));

  always #5 clk = ~clk;

  task automatic xfer(input logic r, input logic [6:0] d, input logic [7:0] a, input logic [7:0] w);
    @(negedge clk);
    rw = r; dev = d; rega = a; wd = w; start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
  endtask

  // SCL period measurement (device 0x50 traffic only, no stretching)
  longint last_rise = 0, period = 0;
  always @(posedge scl) begin
    if (last_rise != 0 && !s1.scl_oe) period = $time - last_rise;
    last_rise = $time;
  end

  initial begin
    logic [7:0] val [2][8];
    #22 rst_n = 1'b1;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 8; i++) begin
        val[s][i] = 8'($urandom);
        xfer(1'b0, s ? 7'h28 : 7'h50, 8'(16 + i * 3), val[s][i]);
        checks++;
        if (nack) begin failures++; $display("FAIL write nack"); end
      end
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 8; i++) begin
        xfer(1'b1, s ? 7'h28 : 7'h50, 8'(16 + i * 3), 8'h00);
        checks++;
        if (nack || rd !== val[s][i]) begin failures++; $display("FAIL read %0d %0d: %h exp %h nack %b", s, i, rd, val[s][i], nack); end
      end
    xfer(1'b1, 7'h50, 8'd200, 8'h00);
    checks++;
    if (rd !== 8'(200 * 7 + 3)) begin failures++; $display("FAIL preset read %h", rd); end
    xfer(1'b0, 7'h33, 8'd1, 8'h55);
    checks++;
    if (!nack) begin failures++; $display("FAIL no nack for absent device"); end
    xfer(1'b1, 7'h50, 8'd5, 8'h00);
    checks++;
    if (nack) begin failures++; $display("FAIL nack after absent device"); end
    checks++;
    if (period != 4 * DIV * 10) begin failures++; $display("FAIL SCL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
