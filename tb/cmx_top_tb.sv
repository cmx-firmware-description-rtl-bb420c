// cmx_top_tb: end-to-end run of the whole CMX at its default size.
//
// Sixteen processor modules send jet TOBs over the backplane (24 lines at
// 160 Mbps plus an 80 MHz forwarded clock each, with a little skew), a few
// words with a parity error. The testbench keeps its own model of the chain:
// for every crossing it works out the threshold multiplicities and the packed
// TOB list from the words it sent, and checks
//  * the CTP output (crate mode: local multiplicities; system mode: local plus
//    the cable input, saturating) three clocks after the crossing is captured,
//  * the 24 L1Topo GTX streams: every frame is rebuilt from its eight words,
//    its CRC checked, and the flat TOB/bunch-counter vector compared,
//  * the DAQ and RoI G-Link frames sent on L1A (data, odd parity, DAV) and the
//    L1As lost while a frame is running,
//  * the per-input parity error counters and the bunch counter,
//  * on the board support side, a VME read of the module ID and an I2C write
//    and read-back through the SFP1 channel.
// Each mechanism (parity error, TOB overflow, multiplicity saturation, control
// characters for empty frames, crate and system mode, cable parity error,
// accepted and lost L1A, bunch counter reset, VME access, I2C transfer) is
// counted; one that never happens counts as a failure.
`timescale 1ps/1ps
module cmx_top_tb;
  import cmx_pkg::*;
  localparam int NBC = 360;
  localparam longint T40 = 25000;

  // ---------------- clocks ----------------
  logic clk40 = 1'b0, clk320 = 1'b0, bspt_clk = 1'b0;
  logic [1:0] gtx_clk = '0;
  // the base FPGA clocks stop once its part of the test is over (base_run)
  bit base_run = 1'b1;
  initial begin #10000; while (base_run) begin clk40 = 1'b1; #12500; clk40 = 1'b0; #12500; end end
  initial begin #10000; while (base_run) begin clk320 = 1'b1; #1562; clk320 = 1'b0; #1563; end end
  initial begin #10900; while (base_run) begin gtx_clk[0] = 1'b1; #1562; gtx_clk[0] = 1'b0; #1563; end end
  initial begin #11700; while (base_run) begin gtx_clk[1] = 1'b1; #1562; gtx_clk[1] = 1'b0; #1563; end end
  always #12500 bspt_clk = ~bspt_clk;

  // ---------------- DUT ----------------
  logic rst_n = 1'b0, bspt_rst_n = 1'b0, bcr = 1'b0, l1a = 1'b0, is_system = 1'b0, pclr = 1'b0;
  logic [15:0] bp_clk80 = '0;
  logic [15:0][23:0] bp_data = '0;
  logic [24:0][9:0] thr_value;
  logic [24:0] thr_small;
  mult_t [24:0] cable_out, cable_in = '0, ctp_mult;
  logic cable_out_par, cable_in_par = 1'b1, adder_error;
  logic [23:0][15:0] txd; logic [23:0][1:0] txk; logic [23:0] txv; logic ferr;
  logic [19:0] daq_data, roi_data; logic daq_dav, roi_dav, l1a_lost;
  logic [15:0][7:0] perr_cnt;
  logic [11:0] bcid;
  logic [23:1] vme_addr = '0; logic as_n = 1'b1, ds_n = 1'b1, wr_n = 1'b1;
  logic [15:0] vdin = '0, vdout; logic oe_n, vdir, dtack_n;
  logic [15:0] mctrl, mres, tctrl; logic [7:0] ldir;
  logic [5:0] scl_oe, sda_oe, s_sda, s_scl;
  logic [6:0] mpa; logic [15:0] mpd_o; logic mpd_oe, mpce_n, mpwe_n, mpoe_n; logic [3:0] leds;
  wire scl0 = ~(scl_oe[0] | s_scl[0]);
  wire sda0 = ~(sda_oe[0] | s_sda[0]);
  assign s_sda[5:1] = '0; assign s_scl[5:1] = '0;

  cmx_top dut (
    .clk40(clk40), .clk320(clk320), .gtx_clk(gtx_clk), .rst_n(rst_n),
    .bp_clk80(bp_clk80), .bp_data(bp_data), .bcr(bcr), .l1a(l1a),
    .thr_value(thr_value), .thr_small(thr_small), .is_system(is_system), .parity_clear(pclr),
    .cable_out(cable_out), .cable_out_par(cable_out_par), .cable_in(cable_in), .cable_in_par(cable_in_par),
    .ctp_mult(ctp_mult), .adder_error(adder_error),
    .gtx_txdata(txd), .gtx_txcharisk(txk), .gtx_txvalid(txv), .gtx_fifo_error(ferr),
    .daq_data(daq_data), .daq_dav(daq_dav), .roi_data(roi_data), .roi_dav(roi_dav), .l1a_lost(l1a_lost),
    .parity_err_count(perr_cnt), .bcid(bcid),
    .bspt_clk(bspt_clk), .bspt_rst_n(bspt_rst_n), .ga(5'd3), .vme_addr(vme_addr), .vme_as_n(as_n),
    .vme_ds_n(ds_n), .vme_write_n(wr_n), .vme_d_in(vdin), .vme_d_out(vdout), .vme_buf_oe_n(oe_n),
    .vme_buf_dir(vdir), .vme_dtack_n(dtack_n), .status1_in(16'h0001), .status2_in(16'h0000),
    .module_ctrl(mctrl), .module_resets(mres), .bf_lvds_req(8'h0F), .tp_lvds_req(8'hF0), .lvds_dir(ldir),
    .i2c_scl_oe(scl_oe), .i2c_sda_oe(sda_oe), .i2c_scl_i({5'h1F, scl0}), .i2c_sda_i({5'h1F, sda0}),
    .ttc_ctrl(tctrl), .ttc_status(16'h0), .ttc_brcst(8'h0), .ttc_brcst_str(1'b0), .ttc_dq(4'h0),
    .ttc_dout_str(1'b0), .ace_mpa(mpa), .ace_mpd_o(mpd_o), .ace_mpd_i(16'h0), .ace_mpd_oe(mpd_oe),
    .ace_mpce_n(mpce_n), .ace_mpwe_n(mpwe_n), .ace_mpoe_n(mpoe_n), .leds(leds));

  i2c_slave_model #(.ADDR(7'h50)) sfp1 (.scl(scl0), .sda(sda0), .sda_oe(s_sda[0]), .scl_oe(s_scl[0]));

  int checks = 0, failures = 0;
  int n_perr = 0, n_ovf = 0, n_sat = 0, n_idle = 0, n_sys = 0, n_crate = 0, n_cable_bad = 0;
  int n_l1a_daq = 0, n_l1a_roi = 0, n_lost = 0, n_bcr = 0, n_vme = 0, n_i2c = 0;

  // ---------------- stimulus data ----------------
  logic [95:0] w_in [NBC][16];
  bit          w_bad [NBC][16];

  initial begin
    for (int t = 0; t < 25; t++) begin
      thr_value[t] = 10'(20 + 37 * t);
      thr_small[t] = (t >= 15);
    end
    for (int k = 0; k < NBC; k++) begin
      int dens;
      dens = (k / 3) % 5;
      for (int i = 0; i < 16; i++) begin
        logic [95:0] w;
        w = {$urandom, $urandom, $urandom};
        w[94:88] = '0;
        for (int s = 0; s < 4; s++) w[88+s] = ($urandom % 4) < dens;
        w[95] = 1'b0; w[95] = ~(^w);
        w_bad[k][i] = (k > 5) && (k < NBC - 10) && ($urandom % 50 == 0);
        if (w_bad[k][i]) w[94] = ~w[94];
        w_in[k][i] = w;
      end
    end
  end

  for (genvar i = 0; i < 16; i++) begin : g_src
    initial begin
      #(i * 90 + 1);
      for (int k = 0; k < NBC; k++)
        for (int j = 0; j < 4; j++) begin
          bp_data[i] = w_in[k][i][24*j +: 24];
          #3125 bp_clk80[i] = (j % 2 == 0);
          #3125;
        end
    end
  end

  // ---------------- reference of the real-time chain ----------------
  logic [2:0]  r_mult [NBC][25];
  logic [25:0] r_tobs [NBC][32];
  int          r_cnt  [NBC];
  initial begin
    #1;
    for (int k = 0; k < NBC; k++) begin
      for (int t = 0; t < 25; t++) r_mult[k][t] = 0;
      for (int j = 0; j < 32; j++) r_tobs[k][j] = '0;
      r_cnt[k] = 0;
      for (int i = 0; i < 16; i++)
        for (int s = 0; s < 4; s++)
          if (w_in[k][i][88+s]) begin
            logic [21:0] raw;
            raw = w_in[k][i][22*s +: 22];
            for (int t = 0; t < 25; t++)
              if ((thr_small[t] ? int'(raw[18:10]) : int'(raw[9:0])) > int'(thr_value[t]) && r_mult[k][t] < 7)
                r_mult[k][t]++;
            if (r_cnt[k] < 32) r_tobs[k][r_cnt[k]] = {4'(i), raw};
            r_cnt[k]++;
          end
    end
  end

  function automatic logic [851:0] roi_vec(int k, logic [11:0] bc);
    logic [831:0] tv;
    for (int j = 0; j < 32; j++) tv[26*j +: 26] = r_tobs[k][j];
    return {7'(r_cnt[k]), r_cnt[k] > 32, bc, tv};
  endfunction

  function automatic logic [7:0] ref_crc(logic [119:0] p);
    logic [7:0] c = '0;
    for (int i = 0; i < 120; i++) begin
      logic fb;
      fb = c[7] ^ p[8*(i/8) + 7 - (i%8)];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  // ---------------- per-edge control and checks ----------------
  int e = 0;                         // number of clk40 edges so far; after edge e the input words hold crossing e-2
  int first_edge = 0;                // edge at which reset was released
  mult_t [24:0] cab_at [NBC + 8];
  bit    cab_bad [NBC + 8], sys_at [NBC + 8], l1a_at [NBC + 8];
  logic [11:0] bcid_at [NBC + 8];
  int daq_free = 0, roi_free = 0;
  logic [1535:0] daq_exp [$];
  logic [851:0]  roi_exp [$];
  logic [11:0]   last_bcid;

  always @(posedge clk40) begin
    e <= e + 1;
    #1;
    bcid_at[e] = bcid;
    // bunch counter
    if (rst_n && e > first_edge + 1) begin
      checks++;
      if (bcr ? bcid != 0 : bcid != ((last_bcid == 3563) ? 12'd0 : last_bcid + 1'b1)) begin
        failures++; $display("FAIL bunch counter %0d after %0d", bcid, last_bcid);
      end
    end
    last_bcid = bcid;
    // CTP output: after edge number e it carries crossing e-4
    if (e - 4 >= 4 && e - 4 < NBC) begin
      int k;
      k = e - 4;
      checks++;
      for (int t = 0; t < 25; t++) begin
        int s;
        s = sys_at[e] ? int'(r_mult[k][t]) + int'(cab_at[e][t]) : int'(r_mult[k][t]);
        if (s > 7) s = 7;
        if (r_mult[k][t] == 7) n_sat++;
        if (int'(ctp_mult[t]) != s) begin failures++; $display("FAIL CTP crossing %0d thr %0d: %0d exp %0d", k, t, ctp_mult[t], s); end
      end
      if (sys_at[e]) n_sys++; else n_crate++;
      if (r_cnt[k] > 32) n_ovf++;
      for (int i = 0; i < 16; i++) if (w_bad[k][i]) n_perr++;
      begin
        // error flag: cable parity in system mode, or a parity error in the crossing
        bit exp_err;
        exp_err = sys_at[e] && cab_bad[e];
        for (int i = 0; i < 16; i++) if (w_bad[k][i]) exp_err = 1;
        checks++;
        if (adder_error !== exp_err) begin failures++; $display("FAIL adder error flag crossing %0d", k); end
      end
      if (sys_at[e] && cab_bad[e]) n_cable_bad++;
    end
  end

  // control inputs, changed 2 ps after an edge, so sampled at the next edge
  initial begin
    @(posedge clk40);
    @(posedge clk40); #2;
    rst_n = 1'b1; bspt_rst_n = 1'b1; first_edge = e;
    forever begin
      @(posedge clk40); #2;
      is_system = ((e / 40) % 2) == 1;
      for (int t = 0; t < 25; t++) cable_in[t] = 3'($urandom % ((e % 4 == 0) ? 8 : 3));
      cab_bad[e + 1] = ($urandom % 7 == 0);
      cable_in_par = ~(^cable_in) ^ cab_bad[e + 1];
      cab_at[e + 1] = cable_in;
      sys_at[e + 1] = is_system;
      bcr = (e % 150 == 77);
      if (bcr) n_bcr++;
      l1a = (e > 8 && e < NBC - 90 && $urandom % 10 == 0);
      if (l1a) begin
        // DAQ frame holds the input words of crossing e-2, RoI the decoded crossing e-3
        if (e + 1 >= daq_free) begin
          logic [1535:0] v;
          for (int i = 0; i < 16; i++) v[96*i +: 96] = w_in[e - 2][i];
          daq_exp.push_back(v); daq_free = e + 1 + 77 + 3; n_l1a_daq++;
        end else n_lost++;
        if (e + 1 >= roi_free) begin
          roi_exp.push_back(roi_vec(e - 3, bcid_at[e - 1])); roi_free = e + 1 + 43 + 3; n_l1a_roi++;
        end else n_lost++;
      end
    end
  end

  // ---------------- G-Link receivers ----------------
  int daq_frames = 0, roi_frames = 0;
  initial begin
    logic [19:0] words [$];
    forever begin
      @(posedge clk40); #1;
      if (daq_dav) words.push_back(daq_data);
      else if (words.size() != 0) begin
        logic [1539:0] v; logic [19:0] par;
        par = '1;
        checks++;
        if (words.size() != 78) begin failures++; $display("FAIL DAQ frame length %0d", words.size()); end
        else begin
          for (int k = 0; k < 77; k++) begin v[20*k +: 20] = words[k]; par ^= words[k]; end
          if (par !== words[77]) begin failures++; $display("FAIL DAQ parity"); end
          if (daq_exp.size() == 0 || v[1535:0] !== daq_exp[0]) begin failures++; $display("FAIL DAQ data"); end
          if (daq_exp.size() != 0) void'(daq_exp.pop_front());
        end
        daq_frames++;
        words.delete();
      end
    end
  end
  initial begin
    logic [19:0] words [$];
    forever begin
      @(posedge clk40); #1;
      if (roi_dav) words.push_back(roi_data);
      else if (words.size() != 0) begin
        logic [859:0] v; logic [19:0] par;
        par = '1;
        checks++;
        if (words.size() != 44) begin failures++; $display("FAIL RoI frame length %0d", words.size()); end
        else begin
          for (int k = 0; k < 43; k++) begin v[20*k +: 20] = words[k]; par ^= words[k]; end
          if (par !== words[43]) begin failures++; $display("FAIL RoI parity"); end
          if (roi_exp.size() == 0 || v[851:0] !== roi_exp[0]) begin failures++; $display("FAIL RoI data"); end
          if (roi_exp.size() != 0) void'(roi_exp.pop_front());
        end
        roi_frames++;
        words.delete();
      end
    end
  end

  // ---------------- L1Topo receivers ----------------
  logic [119:0] topo_rx [NBC + 8][24];
  int topo_frames [24];
  for (genvar g = 0; g < 24; g++) begin : g_topo
    int nw = 0;
    logic [127:0] fr;
    logic [15:0]  kk;
    initial topo_frames[g] = 0;
    always @(posedge gtx_clk[g / 12]) if (txv[g] && rst_n) begin
      #1;
      fr[16*(nw % 8) +: 16] = txd[g];
      kk[2*(nw % 8) +: 2]   = txk[g];
      if (nw % 8 == 7) begin
        logic [119:0] p;
        p = (kk == 16'h7FFF) ? '0 : fr[119:0];
        if (kk != 16'h7FFF && kk != 16'h0000) begin failures++; $display("FAIL stream %0d charisk %h", g, kk); end
        if (kk == 16'h7FFF && (fr[111:0] != {14{8'hBC}} || fr[119:112] != 8'hBC)) begin
          failures++; $display("FAIL stream %0d idle frame", g);
        end
        if (kk == 16'h7FFF) n_idle++;
        checks++;
        if (fr[127:120] !== ref_crc(p)) begin failures++; $display("FAIL stream %0d CRC", g); end
        if (nw / 8 < NBC + 8) topo_rx[nw / 8][g] = p;
        topo_frames[g]++;
      end
      nw++;
    end
  end

  // ---------------- board support: VME and I2C ----------------
  task automatic vme(input logic w, input logic [23:0] addr, input logic [15:0] d, output logic [15:0] q);
    vme_addr = addr[23:1]; wr_n = ~w; vdin = d;
    #30000 as_n = 1'b0;
    #10000 ds_n = 1'b0;
    wait (!dtack_n);
    q = vdout;
    #20000 ds_n = 1'b1; as_n = 1'b1;
    wait (dtack_n);
    #50000;
    n_vme++;
  endtask

  bit bspt_done = 0;
  initial begin
    logic [15:0] q;
    wait (bspt_rst_n);
    #200000;
    vme(1'b0, 24'h700000, 16'h0, q);
    checks++; if (q !== 16'hC301) begin failures++; $display("FAIL module ID %h", q); end
    vme(1'b0, 24'h70000C, 16'h0, q);
    checks++; if (q !== 16'hF00F || ldir !== 8'hFF) begin failures++; $display("FAIL LVDS status %h", q); end
    vme(1'b1, 24'h700012, 16'hC300, q);
    vme(1'b1, 24'h700010, {1'b0, 7'h50, 8'h10}, q);
    do begin #20000000; vme(1'b0, 24'h700010, 16'h0, q); end while (q[15]);
    vme(1'b1, 24'h700010, {1'b1, 7'h50, 8'h10}, q);
    do begin #20000000; vme(1'b0, 24'h700010, 16'h0, q); end while (q[15]);
    vme(1'b0, 24'h700012, 16'h0, q);
    checks++; if (q !== 16'hC3C3) begin failures++; $display("FAIL I2C read back %h", q); end
    else n_i2c++;
    bspt_done = 1;
  end

  // ---------------- end of run ----------------
  initial begin
    int n_topo_chk;
    wait (e == NBC + 6);
    base_run = 1'b0;
    wait (bspt_done);
    #1;
    // L1Topo payloads: frame n carries the encoder output after edge first_edge+1+n,
    // i.e. crossing first_edge+n-3
    n_topo_chk = 0;
    for (int n = 0; n < topo_frames[23] && n < NBC + 8; n++) begin
      int k;
      k = first_edge + n - 3;
      if (k >= 4 && k < NBC - 4) begin
        logic [2879:0] flat;
        flat = '0;
        flat[851:0] = roi_vec(k, bcid_at[k + 2]);
        checks++; n_topo_chk++;
        for (int g = 0; g < 24; g++)
          if (topo_rx[n][g] !== flat[120*g +: 120]) begin
            failures++; $display("FAIL L1Topo crossing %0d stream %0d", k, g); break;
          end
      end
    end
    // parity error counters (counting starts after reset)
    for (int i = 0; i < 16; i++) begin
      int nb;
      nb = 0;
      for (int k = 0; k < NBC; k++) if (w_bad[k][i]) nb++;
      checks++;
      if (int'(perr_cnt[i]) != nb) begin failures++; $display("FAIL parity count %0d: %0d exp %0d", i, perr_cnt[i], nb); end
    end
    checks++;
    if (ferr) begin failures++; $display("FAIL GTX FIFO error"); end
    $display("mechanisms: parity_err=%0d overflow=%0d saturation=%0d idle_frames=%0d system=%0d crate=%0d cable_bad=%0d l1a_daq=%0d l1a_roi=%0d l1a_lost=%0d bcr=%0d vme=%0d i2c=%0d topo_frames=%0d daq_frames=%0d roi_frames=%0d",
             n_perr, n_ovf, n_sat, n_idle, n_sys, n_crate, n_cable_bad, n_l1a_daq, n_l1a_roi, n_lost, n_bcr, n_vme, n_i2c, n_topo_chk, daq_frames, roi_frames);
    if (n_perr == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_sys == 0 || n_crate == 0) failures++;
    if (n_cable_bad == 0) failures++;
    if (n_l1a_daq == 0 || n_l1a_roi == 0 || n_lost == 0) failures++;
    if (daq_frames != n_l1a_daq || roi_frames != n_l1a_roi) begin failures++; $display("FAIL frame counts"); end
    if (n_bcr == 0 || n_vme == 0 || n_i2c == 0 || n_topo_chk < NBC - 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd3000000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
