// jet_adder_tb: random local and cable multiplicities in crate mode and in
// system mode (the mode switches during the run), with cable words of both good
// and bad parity. Checks the saturating sum to the CTP, the cable output and
// its odd parity, and the error flag, all one clock after the inputs.
module jet_adder_tb;
  import cmx_pkg::*;
  localparam int NEV = 400;
  logic clk = 1'b0, is_system = 1'b0, local_err = 1'b0;
  mult_t [24:0] local_mult, cable_out, ctp_mult;
  mult_t [0:0][24:0] cable_in;
  logic [0:0] cable_in_par;
  logic cable_out_par, error;
  int checks = 0, failures = 0, n_sat = 0, n_bad = 0, n_sys = 0;

  jet_adder dut (.clk(clk), .is_system(is_system), .local_mult(local_mult), .local_err(local_err),
    .cable_out(cable_out), .cable_out_par(cable_out_par), .cable_in(cable_in),
    .cable_in_par(cable_in_par), .ctp_mult(ctp_mult), .error(error));

  always #5 clk = ~clk;

  initial begin
    for (int e = 0; e < NEV; e++) begin
      bit bad;
      int ones;
      @(negedge clk);
      is_system = (e / 50) % 2;
      for (int t = 0; t < 25; t++) begin
        local_mult[t] = 3'($urandom % 8);
        cable_in[0][t] = 3'($urandom % (e % 3 == 0 ? 8 : 3));
      end
      local_err = ($urandom % 10 == 0);
      bad = ($urandom % 6 == 0);
      ones = $countones(cable_in[0]);
      cable_in_par[0] = ((ones % 2) == 0) ^ bad;   // odd parity unless bad
      @(posedge clk); #1;
      checks++;
      for (int t = 0; t < 25; t++) begin
        int s;
        s = is_system ? int'(local_mult[t]) + int'(cable_in[0][t]) : int'(local_mult[t]);
        if (s > 7) begin s = 7; n_sat++; end
        if (int'(ctp_mult[t]) != s) begin failures++; $display("FAIL ev %0d t %0d: %0d exp %0d", e, t, ctp_mult[t], s); end
      end
      if (cable_out !== local_mult || (($countones(cable_out) + cable_out_par) % 2) != 1) begin
        failures++; $display("FAIL ev %0d cable out", e);
      end
      if (error !== (local_err | (is_system & bad))) begin failures++; $display("FAIL ev %0d error flag", e); end
      if (is_system) n_sys++;
      if (is_system && bad) n_bad++;
    end
    checks++;
    if (n_sat == 0 || n_bad == 0 || n_sys == 0) failures++;
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
