// glink_tx_tb: a 90-bit readout record (5 bits per line, 10 padding bits) sent
// on random L1As, some of them while a frame is still running. For each
// accepted L1A the link must show, from the next clock on, 5 words with DAV
// high carrying data[20k+19:20k], one word of odd parity per line with DAV
// high, then at least one quiet word (DAV low, data low). L1As that arrive
// during a frame must be reported as lost. The frame length in cycles is
// checked against the expected 5 + 1 + gap.
module glink_tx_tb;
  localparam int DB = 90, NPL = 5, NCYC = 3000;
  logic clk = 1'b0, rst_n = 1'b0, l1a = 1'b0;
  logic [DB-1:0] data = '0;
  logic [19:0] gl;
  logic dav, busy, lost;
  int checks = 0, failures = 0, n_acc = 0, n_lost = 0;

  glink_tx #(.DATA_BITS(DB), .GAP_CYCLES(1)) dut (.clk(clk), .rst_n(rst_n), .l1a(l1a), .data(data),
    .gl_data(gl), .gl_dav(dav), .busy(busy), .l1a_lost(lost));

  always #5 clk = ~clk;

  // reference: expected link words per cycle
  logic [20:0] expq [NCYC + 20];   // {dav, data}
  bit          exp_lost [NCYC + 20];
  int          free_at = 0;        // first cycle at which a new L1A is accepted

  initial begin
    for (int c = 0; c < NCYC + 20; c++) begin expq[c] = '0; exp_lost[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      // cycle c: inputs applied before rising edge c
      l1a  = ($urandom % 9 == 0);
      data = {$urandom, $urandom, $urandom};
      if (l1a) begin
        if (c >= free_at) begin
          logic [99:0] pd;
          logic [19:0] par;
          pd = 100'(data);
          par = '1;
          for (int k = 0; k < NPL; k++) begin
            expq[c + 1 + k] = {1'b1, pd[20*k +: 20]};
            par ^= pd[20*k +: 20];
          end
          expq[c + 1 + NPL] = {1'b1, par};
          free_at = c + NPL + 3;           // shift, parity, gap, then idle
          n_acc++;
        end else begin
          exp_lost[c] = 1;
          n_lost++;
        end
      end
      @(negedge clk);
      checks++;
      if ({dav, gl} !== expq[c] || lost !== exp_lost[c]) begin
        failures++; $display("FAIL cycle %0d: %b %h lost %b exp %h %b", c, dav, gl, lost, expq[c], exp_lost[c]);
      end
    end
    checks++;
    if (n_acc == 0 || n_lost == 0) failures++;
    $display("accepted %0d lost %0d", n_acc, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NCYC + 50) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
