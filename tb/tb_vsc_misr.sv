// Self-checking testbench of vsc_misr (W = 9, 9 inputs): random inputs and
// enables against a bit-level model of the internal-XOR MISR with the
// polynomial x^9 + x^5 + 1, checking sdo every cycle. With zero inputs the
// sdo stream must have the maximal period 511, also across a pause of en.
// Reset must clear the register. Everything is observed at the ports.
module tb_vsc_misr;
  localparam int unsigned W = 9, N_IN = 9;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, sdo;
  logic [N_IN-1:0] d = '0;
  logic [W-1:0] m;
  int checks = 0, failures = 0;

  vsc_misr dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // x^9 + x^5 + 1: the feedback (bit 8) enters bit 0 and bit 5.
  function automatic logic [W-1:0] model(input logic [W-1:0] s, input logic [N_IN-1:0] x);
    logic [W-1:0] r;
    r = {s[W-2:0], 1'b0};
    r[0] ^= s[W-1];
    r[5] ^= s[W-1];
    r ^= W'(x);
    return r;
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    m = '0;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      check(sdo === m[W-1], $sformatf("sdo cycle %0d", c));
      en = $urandom_range(0, 4) != 0;
      d  = N_IN'($urandom);
      @(posedge clk);
      if (en) m = model(m, d);
    end
    // Period with zero inputs, seen on sdo only: starting from state 1 the
    // output stream must repeat after 511 steps and not after 7 or 73 (the
    // proper divisors of 511 above 1), and a pause of en must not disturb it.
    @(negedge clk);
    d = '0; en = 1'b0;
    rst_n = 1'b0; #1 rst_n = 1'b1;
    check(sdo === 1'b0, "reset");
    d = N_IN'(1); en = 1'b1;
    @(negedge clk);
    d = '0;
    begin
      bit seq[1100];
      bit p511, p7, p73, zero;
      for (int t = 0; t < 1100; t++) begin
        if (t == 600) begin
          en = 1'b0;
          repeat (3) @(negedge clk);
          en = 1'b1;
        end
        seq[t] = sdo;
        @(negedge clk);
      end
      p511 = 1; p7 = 1; p73 = 1; zero = 1;
      for (int t = 0; t + 511 < 1100; t++) if (seq[t] != seq[t + 511]) p511 = 0;
      for (int t = 0; t + 73 < 1100; t++) if (seq[t] != seq[t + 73]) p73 = 0;
      for (int t = 0; t + 7 < 1100; t++) if (seq[t] != seq[t + 7]) p7 = 0;
      for (int t = 0; t < 1100; t++) if (seq[t]) zero = 0;
      check(p511 && !p73 && !p7 && !zero, "maximal-length period 511 on sdo");
    end
    rst_n = 1'b0; #1;
    check(sdo === 1'b0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
