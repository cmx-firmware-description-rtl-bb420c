// input_channel_tb: drives one processor input the way the backplane does
// (four 24-bit words per 25 ns crossing, 80 MHz clock centred in the data
// windows) and checks that each crossing's {d3,d2,d1,d0} appears in the system
// register at the clk40 edge 35 ns after its first word, i.e. that demultiplexing,
// pair ordering and the 35 ns latency are right.
// Time unit: 1 ps. Crossing k starts at k*25 ns; clk40 rises at 10 ns + k*25 ns.
`timescale 1ps/1ps
module input_channel_tb;
  localparam int NBC = 200;
  logic        clk80 = 1'b0, clk40 = 1'b0;
  logic [23:0] din = '0;
  logic [95:0] data96, data96_fwd;
  logic [95:0] exp_w [NBC];
  int checks = 0, failures = 0;

  input_channel #(.LINES(24), .SECOND_PAIR_LEVEL(1'b0)) dut (
    .clk80(clk80), .din(din), .clk40(clk40), .data96(data96), .data96_fwd(data96_fwd));

  initial begin
    #10000;
    forever begin clk40 = 1'b1; #12500; clk40 = 1'b0; #12500; end
  end

  // data and forwarded clock, both from the sending module
  initial begin
    for (int k = 0; k < NBC; k++)
      exp_w[k] = {$urandom, $urandom, $urandom};
    for (int k = 0; k < NBC; k++) begin
      for (int j = 0; j < 4; j++) begin
        din = exp_w[k][24*j +: 24];
        #3125 clk80 = (j % 2 == 0);   // rising edge in words 0 and 2
        #3125;
      end
    end
  end

  // check at each clk40 edge: edge m holds crossing m-1 (first word 35 ns before)
  initial begin
    @(posedge clk40);
    for (int m = 1; m < NBC - 2; m++) begin
      @(posedge clk40); #1;
      if (m >= 2) begin
        checks++;
        if (data96 !== exp_w[m-1]) begin
          failures++;
          $display("FAIL edge %0d: got %h exp %h", m, data96, exp_w[m-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd25000 * (NBC + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
