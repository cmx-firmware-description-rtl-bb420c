// jet_encoder_tb: random TOB arrays, counts, overflow flags and bunch numbers;
// checks that the registered payloads hold each field at its place in the flat
// vector (TOB k at bits 26k.., bunch counter at 832, overflow at 844, count at
// 845) with zeros above, one clock after the inputs.
module jet_encoder_tb;
  import cmx_pkg::*;
  localparam int NEV = 200;
  logic clk = 1'b0;
  topo_tob_t [31:0] tobs;
  logic [6:0] cnt;
  logic ovf;
  logic [11:0] bcid;
  logic [23:0][119:0] payload;
  int checks = 0, failures = 0;

  jet_encoder dut (.clk(clk), .tobs(tobs), .tob_count(cnt), .overflow(ovf), .bcid(bcid), .payload(payload));

  always #5 clk = ~clk;

  function automatic logic get(int b);   // bit b of the flat vector
    return payload[b / 120][b % 120];
  endfunction

  initial begin
    for (int e = 0; e < NEV; e++) begin
      @(negedge clk);
      for (int k = 0; k < 32; k++) tobs[k] = 26'($urandom);
      cnt = 7'($urandom % 65); ovf = $urandom % 2; bcid = 12'($urandom % 3564);
      @(posedge clk); #1;
      checks++;
      for (int k = 0; k < 32; k++)
        for (int b = 0; b < 26; b++)
          if (get(26*k + b) !== tobs[k][b]) begin failures++; $display("FAIL ev %0d tob %0d", e, k); break; end
      for (int b = 0; b < 12; b++) if (get(832 + b) !== bcid[b]) begin failures++; $display("FAIL bcid"); break; end
      if (get(844) !== ovf) failures++;
      for (int b = 0; b < 7; b++) if (get(845 + b) !== cnt[b]) begin failures++; $display("FAIL count"); break; end
      for (int b = 852; b < 2880; b++) if (get(b) !== 1'b0) begin failures++; $display("FAIL pad"); break; end
    end
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
