// bspt_fpga_tb: VME bus cycles against the board support logic of the CMX in
// slot 20 (base 0x780000). Checks the fixed ID and revision registers, read-back
// of the control, resets and TTCrx control registers, the status inputs, the
// LVDS direction logic and its status registers, the TTCDec broadcast and DQ
// latches, System ACE register writes and reads through a behavioural ACE
// register file, I2C writes and reads to devices on the SFP1 and MP12 channels,
// that no DTACK* comes for an address outside the board's window, that the data
// transceivers drive the bus only in read cycles, and that DTACK* is released
// after the data strobe.
module bspt_fpga_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [23:1] a = '0;
  logic as_n = 1'b1, ds_n = 1'b1, wr_n = 1'b1;
  logic [15:0] din = '0, dout;
  logic oe_n, dir, dtack_n;
  logic [15:0] st1 = 16'h0003, st2 = 16'hA55A, mctrl, mres, tctrl, tstat = 16'h1234;
  logic [7:0] bfr = '0, tpr = '0, ldir;
  logic [5:0] scl_oe, sda_oe, s_sda, s_scl;
  logic [7:0] brc = '0; logic brc_str = 1'b0; logic [3:0] dq = '0; logic dq_str = 1'b0;
  logic [6:0] mpa; logic [15:0] mpd_o, mpd_i; logic mpd_oe, mpce_n, mpwe_n, mpoe_n;
  logic [3:0] leds;
  wire scl0 = ~(scl_oe[0] | s_scl[0]);
  wire sda0 = ~(sda_oe[0] | s_sda[0]);
  wire scl4 = ~(scl_oe[4] | s_scl[4]);
  wire sda4 = ~(sda_oe[4] | s_sda[4]);
  logic [5:0] scl_i, sda_i;
  int checks = 0, failures = 0;

  assign scl_i = {1'b1, scl4, 3'b111, scl0};
  assign sda_i = {1'b1, sda4, 3'b111, sda0};
  assign s_sda[3:1] = '0; assign s_scl[3:1] = '0; assign s_sda[5] = 1'b0; assign s_scl[5] = 1'b0;

  bspt_fpga #(.I2C_DIV(5), .LED_STRETCH(4)) dut (
    .clk(clk), .rst_n(rst_n), .ga(5'd20), .vme_addr(a), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(wr_n), .vme_d_in(din), .vme_d_out(dout), .vme_buf_oe_n(oe_n), .vme_buf_dir(dir),
    .vme_dtack_n(dtack_n), .status1_in(st1), .status2_in(st2), .module_ctrl(mctrl),
    .module_resets(mres), .bf_lvds_req(bfr), .tp_lvds_req(tpr), .lvds_dir(ldir),
    .scl_oe(scl_oe), .sda_oe(sda_oe), .scl_i(scl_i), .sda_i(sda_i),
    .ttc_ctrl(tctrl), .ttc_status(tstat), .ttc_brcst(brc), .ttc_brcst_str(brc_str),
    .ttc_dq(dq), .ttc_dout_str(dq_str), .ace_mpa(mpa), .ace_mpd_o(mpd_o), .ace_mpd_i(mpd_i),
    .ace_mpd_oe(mpd_oe), .ace_mpce_n(mpce_n), .ace_mpwe_n(mpwe_n), .ace_mpoe_n(mpoe_n), .leds(leds));

  i2c_slave_model #(.ADDR(7'h50)) sfp1 (.scl(scl0), .sda(sda0), .sda_oe(s_sda[0]), .scl_oe(s_scl[0]));
  i2c_slave_model #(.ADDR(7'h28)) mp12 (.scl(scl4), .sda(sda4), .sda_oe(s_sda[4]), .scl_oe(s_scl[4]));

  // System ACE MPU register file
  logic [15:0] ace_regs [128];
  initial for (int i = 0; i < 128; i++) ace_regs[i] = 16'(i * 257);
  assign mpd_i = (!mpce_n && !mpoe_n) ? ace_regs[mpa] : 16'h0000;
  always @(posedge mpwe_n) if (!mpce_n) ace_regs[mpa] = mpd_o;

  always #12 clk = ~clk;   // 40 MHz

  int ack_delay;
  task automatic vme(input logic w, input logic [23:0] addr, input logic [15:0] wdata,
                     output logic [15:0] rdata, output bit acked);
    a = addr[23:1]; wr_n = ~w; din = wdata;
    #30 as_n = 1'b0;
    #10 ds_n = 1'b0;
    acked = 0; ack_delay = 0;
    for (int t = 0; t < 400; t++) begin
      #10;
      if (!dtack_n) begin acked = 1; break; end
      ack_delay++;
      if (!w && !oe_n && !dir) begin failures++; $display("FAIL transceiver direction"); end
    end
    rdata = dout;
    if (acked && !w && (oe_n || !dir)) begin failures++; $display("FAIL transceiver off in read"); end
    if (acked && w && !oe_n && dir) begin failures++; $display("FAIL board drives bus in write"); end
    #20 ds_n = 1'b1; as_n = 1'b1;
    #100;
    if (acked && !dtack_n) begin failures++; $display("FAIL DTACK not released"); end
  endtask

  localparam logic [23:0] BASE = 24'h780000;
  logic [15:0] r; bit ok;

  task automatic rd_chk(input logic [7:0] off, input logic [15:0] exp);
    vme(1'b0, BASE + 24'(off), 16'h0, r, ok);
    checks++;
    if (!ok || r !== exp) begin failures++; $display("FAIL read %h: %h exp %h ack %b", off, r, exp, ok); end
  endtask
  task automatic wr(input logic [7:0] off, input logic [15:0] d);
    vme(1'b1, BASE + 24'(off), d, r, ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL write %h not acknowledged", off); end
  endtask
  task automatic i2c_wait(input logic [7:0] off);
    do vme(1'b0, BASE + 24'(off), 16'h0, r, ok); while (r[15]);
  endtask

  initial begin
    #100 rst_n = 1'b1;
    #100;
    rd_chk(8'h00, 16'hC301);
    rd_chk(8'h02, 16'h0200);
    wr(8'h04, 16'hBEEF); rd_chk(8'h04, 16'hBEEF);
    checks++; if (mctrl !== 16'hBEEF) failures++;
    wr(8'h06, 16'h0042); rd_chk(8'h06, 16'h0042);
    checks++; if (mres !== 16'h0042) failures++;
    rd_chk(8'h08, 16'h0003);
    rd_chk(8'h0A, 16'hA55A);
    bfr = 8'b0000_1011; tpr = 8'b0011_0010;
    rd_chk(8'h0C, {tpr, bfr});
    rd_chk(8'h0E, {8'b0000_0010, 8'b0011_1001});
    checks++; if (ldir !== 8'b0011_1001) begin failures++; $display("FAIL lvds dir"); end
    wr(8'h30, 16'h00A5); rd_chk(8'h30, 16'h00A5);
    checks++; if (tctrl !== 16'h00A5) failures++;
    rd_chk(8'h32, 16'h1234);
    brc = 8'hC4; #5 brc_str = 1'b1; #50 brc_str = 1'b0; brc = 8'h00;
    dq = 4'h9;   #5 dq_str = 1'b1;  #50 dq_str = 1'b0;  dq = 4'h0;
    rd_chk(8'h34, 16'h00C4);
    rd_chk(8'h36, 16'h0009);
    // reserved address
    rd_chk(8'h60, 16'h0000);
    // System ACE
    rd_chk(8'h84, 16'(4 * 257));
    checks++; if (ack_delay < 4) begin failures++; $display("FAIL ACE cycle too short"); end
    wr(8'hC2, 16'h7E57);
    rd_chk(8'hC2, 16'h7E57);
    checks++; if (ace_regs[7'h42] !== 16'h7E57) failures++;
    // address outside this board's window: no DTACK
    vme(1'b0, 24'h700000, 16'h0, r, ok);
    checks++; if (ok) begin failures++; $display("FAIL answered other slot"); end
    vme(1'b0, BASE + 24'h100, 16'h0, r, ok);
    checks++; if (ok) begin failures++; $display("FAIL answered outside BSPT space"); end
    // I2C: SFP1 write and read back
    wr(8'h12, 16'h5A00);                 // write data in bits 15..8
    wr(8'h10, {1'b0, 7'h50, 8'h21});     // write register 0x21
    i2c_wait(8'h10);
    checks++; if (r[14]) begin failures++; $display("FAIL SFP1 nack"); end
    checks++; if (sfp1.mem[8'h21] !== 8'h5A) begin failures++; $display("FAIL SFP1 not written"); end
    wr(8'h10, {1'b1, 7'h50, 8'h21});
    i2c_wait(8'h10);
    rd_chk(8'h12, 16'h5A5A);
    // MP12 read of a preset register, and nack for a wrong address
    wr(8'h20, {1'b1, 7'h28, 8'h03});
    i2c_wait(8'h20);
    rd_chk(8'h22, {8'h00, 8'(3 * 7 + 3)});
    wr(8'h20, {1'b1, 7'h29, 8'h03});
    i2c_wait(8'h20);
    checks++; if (!r[14]) begin failures++; $display("FAIL no nack"); end
    checks++; if (leds[1:0] !== 2'b11 && leds[2:1] !== 2'b11) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
