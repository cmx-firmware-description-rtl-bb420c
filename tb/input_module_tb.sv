// input_module_tb: all 16 processor inputs, each with its own small clock/data
// skew, carrying words with correct odd parity except for a known set of
// crossings with a flipped bit. Checks every system-domain word, the parity
// error flag of each word and the per-input error counters, and that clearing
// the counters works.
`timescale 1ps/1ps
module input_module_tb;
  import cmx_pkg::*;
  localparam int NBC = 120;
  logic                         clk40 = 1'b0, rst_n = 1'b0, err_clear = 1'b0;
  logic [15:0]                  clk80 = '0;
  logic [15:0][23:0]            din = '0;
  logic [15:0][95:0]            data;
  logic [15:0]                  perr;
  logic [15:0][7:0]             cnt;
  logic [95:0]                  exp_w [16][NBC];
  bit                           bad   [16][NBC];
  int                           nbad  [16];
  int checks = 0, failures = 0;

  input_module dut (.clk40(clk40), .rst_n(rst_n), .clk80(clk80), .din(din),
                    .err_clear(err_clear), .data(data), .parity_err(perr), .err_count(cnt));

  initial begin
    #10000;
    forever begin clk40 = 1'b1; #12500; clk40 = 1'b0; #12500; end
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      nbad[i] = 0;
      for (int k = 0; k < NBC; k++) begin
        logic [95:0] w;
        w = {$urandom, $urandom, $urandom};
        w[95] = 1'b0;
        w[95] = ~(^w);                 // odd parity
        bad[i][k] = ($urandom % 7 == 0) && k >= 4 && k < NBC - 10;
        if (bad[i][k]) begin int b; b = int'($urandom % 95); w[b] = ~w[b]; nbad[i]++; end
        exp_w[i][k] = w;
      end
    end
  end

  for (genvar i = 0; i < 16; i++) begin : g_src
    initial begin
      #(i * 100 + 1);                  // up to 1.5 ns skew between inputs
      for (int k = 0; k < NBC; k++)
        for (int j = 0; j < 4; j++) begin
          din[i] = exp_w[i][k][24*j +: 24];
          #3125 clk80[i] = (j % 2 == 0);
          #3125;
        end
    end
  end

  initial begin
    @(posedge clk40);
    for (int m = 1; m < NBC - 2; m++) begin
      @(posedge clk40); #1;
      if (m == 2) rst_n = 1'b1;   // count from crossing 1 on
      if (m >= 2)
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (data[i] !== exp_w[i][m-1] || perr[i] !== bad[i][m-1]) begin
            failures++;
            $display("FAIL in %0d edge %0d: %h/%b exp %h/%b (%h %h)", i, m, data[i], perr[i], exp_w[i][m-1], bad[i][m-1], exp_w[i][m-2], exp_w[i][m]);
          end
        end
    end
    #30000;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (cnt[i] != 8'(nbad[i])) begin failures++; $display("FAIL count %0d: %0d exp %0d", i, cnt[i], nbad[i]); end
    end
    @(negedge clk40) err_clear = 1'b1;
    @(negedge clk40) err_clear = 1'b0;
    checks++;
    if (cnt != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd25000 * (NBC + 40));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
