// jet_decoder_tb: random crossings with a varying number of present TOBs
// (from none to all 64, so that both packing and overflow occur) and random
// thresholds. A reference computed here from the raw 96-bit words gives the
// multiplicities, the packed TOB list, the count and the overflow flag; the
// outputs are compared one clock after the inputs (the one-cycle latency).
module jet_decoder_tb;
  import cmx_pkg::*;
  localparam int NEV = 400;
  logic clk = 1'b0;
  logic [15:0][95:0]       in_data;
  logic [15:0]             in_perr;
  logic [24:0][9:0]        thr_value;
  logic [24:0]             thr_small;
  mult_t [24:0]            mult;
  logic                    perr;
  topo_tob_t [31:0]        tobs;
  logic [6:0]              cnt;
  logic                    ovf;
  int checks = 0, failures = 0, n_ovf = 0, n_sat = 0;

  jet_decoder dut (.clk(clk), .in_data(in_data), .in_parity_err(in_perr),
    .thr_value(thr_value), .thr_small(thr_small), .mult(mult), .parity_err(perr),
    .tobs(tobs), .tob_count(cnt), .overflow(ovf));

  always #5 clk = ~clk;

  // reference
  logic [2:0]  r_mult [25];
  logic [25:0] r_tobs [32];
  int          r_cnt;
  task automatic reference();
    r_cnt = 0;
    for (int j = 0; j < 32; j++) r_tobs[j] = '0;
    for (int t = 0; t < 25; t++) r_mult[t] = 0;
    for (int i = 0; i < 16; i++)
      for (int s = 0; s < 4; s++)
        if (in_data[i][88+s]) begin
          logic [21:0] raw;
          int el, es;
          raw = in_data[i][22*s +: 22];
          el = int'(raw[9:0]);
          es = int'(raw[18:10]);
          for (int t = 0; t < 25; t++)
            if ((thr_small[t] ? es : el) > int'(thr_value[t]) && r_mult[t] < 7) r_mult[t]++;
          if (r_cnt < 32) r_tobs[r_cnt] = {4'(i), raw};
          r_cnt++;
        end
  endtask

  initial begin
    in_data = '0; in_perr = '0; thr_value = '0; thr_small = '0;
    for (int e = 0; e < NEV; e++) begin
      int dens;
      @(negedge clk);
      dens = e % 5;     // 0: empty, 4: dense
      for (int i = 0; i < 16; i++) begin
        in_data[i] = {$urandom, $urandom, $urandom};
        for (int s = 0; s < 4; s++) in_data[i][88+s] = ($urandom % 4) < dens;
      end
      in_perr = ($urandom % 8 == 0) ? 16'(1 << ($urandom % 16)) : '0;
      for (int t = 0; t < 25; t++) begin
        thr_value[t] = 10'($urandom % 1024);
        thr_small[t] = $urandom % 2;
      end
      reference();
      @(posedge clk); #1;
      checks++;
      for (int t = 0; t < 25; t++) begin
        if (mult[t] !== r_mult[t]) begin failures++; $display("FAIL ev %0d thr %0d: %0d exp %0d", e, t, mult[t], r_mult[t]); end
        if (r_mult[t] == 7) n_sat++;
      end
      for (int j = 0; j < 32; j++)
        if (tobs[j] !== r_tobs[j]) begin failures++; $display("FAIL ev %0d tob %0d", e, j); end
      if (cnt != 7'(r_cnt) || ovf !== (r_cnt > 32) || perr !== (in_perr != 0)) begin
        failures++; $display("FAIL ev %0d count %0d/%0d ovf %b", e, cnt, r_cnt, ovf);
      end
      if (ovf) n_ovf++;
    end
    checks++;
    if (n_ovf == 0 || n_sat == 0) begin failures++; $display("FAIL overflow or saturation never happened"); end
    $display("overflows %0d saturations %0d", n_ovf, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NEV + 20) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
