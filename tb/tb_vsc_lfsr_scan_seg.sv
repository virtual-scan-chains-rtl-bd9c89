// Self-checking testbench of vsc_lfsr_scan_seg for lengths 4, 15 and 16
// (15 and 16 are the segment lengths of the default p-bit sub-chain).
// Checks serial shifting, hold, capture, single LFSR steps against a model of
// the Fibonacci recurrence, and that each LFSR is maximal length: from a
// nonzero seed it comes back after exactly 2^L - 1 steps and not earlier.
module tb_vsc_lfsr_scan_seg;
  import vsc_pkg::*;

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drives one instance; the instance's signals are passed by reference.
  `define SEG_TEST(LEN, OPV, SIV, CAPV, QV, SOV)                                   \
    begin                                                                          \
      logic [LEN-1:0] m, seed;                                                     \
      logic [MAX_LFSR-1:0] t;                                                      \
      int unsigned period;                                                         \
      t = lfsr_taps(LEN);                                                          \
      /* capture */                                                                \
      @(negedge clk); OPV = OP_CAPTURE; CAPV = LEN'($urandom); m = CAPV;           \
      @(negedge clk); check(QV === m, $sformatf("L=%0d capture", LEN));            \
      /* shift in LEN random bits, checking the serial output each cycle */        \
      OPV = OP_SHIFT;                                                              \
      for (int i = 0; i < LEN; i++) begin                                          \
        SIV = 1'($urandom);                                                        \
        check(SOV === m[LEN-1], $sformatf("L=%0d so during shift", LEN));          \
        m = {m[LEN-2:0], SIV};                                                     \
        @(negedge clk);                                                            \
        check(QV === m, $sformatf("L=%0d shift %0d", LEN, i));                     \
      end                                                                          \
      /* hold */                                                                   \
      OPV = OP_HOLD; SIV = ~SIV; CAPV = ~CAPV;                                     \
      repeat (3) @(negedge clk);                                                   \
      check(QV === m, $sformatf("L=%0d hold", LEN));                               \
      /* LFSR steps against the recurrence */                                      \
      if (m == '0) begin                                                           \
        OPV = OP_CAPTURE; CAPV = LEN'(1); m = LEN'(1); @(negedge clk);             \
      end                                                                          \
      OPV = OP_LFSR;                                                               \
      for (int i = 0; i < 40; i++) begin                                           \
        logic fb;                                                                  \
        fb = 1'b0;                                                                 \
        for (int k = 1; k <= LEN; k++) if (t[k-1]) fb ^= m[k-1];                   \
        check(SOV === m[LEN-1], $sformatf("L=%0d lfsr out %0d", LEN, i));          \
        m = {m[LEN-2:0], fb};                                                      \
        @(negedge clk);                                                            \
        check(QV === m, $sformatf("L=%0d lfsr step %0d", LEN, i));                 \
      end                                                                          \
      /* period */                                                                 \
      seed = QV; period = 0;                                                       \
      do begin @(negedge clk); period++; end                                       \
      while (QV !== seed && period < (1 << LEN));                                  \
      check(period == (1 << LEN) - 1,                                              \
            $sformatf("L=%0d period %0d, expected %0d", LEN, period, (1 << LEN) - 1)); \
      OPV = OP_HOLD;                                                               \
    end

  cell_op_e op4, op15, op16;
  logic si4, si15, si16, so4, so15, so16;
  logic [3:0]  cap4, q4;
  logic [14:0] cap15, q15;
  logic [15:0] cap16, q16;

  vsc_lfsr_scan_seg #(.L(4))  u4  (.clk, .op(op4),  .si(si4),  .cap_d(cap4),  .q(q4),  .so(so4));
  vsc_lfsr_scan_seg #(.L(15)) u15 (.clk, .op(op15), .si(si15), .cap_d(cap15), .q(q15), .so(so15));
  vsc_lfsr_scan_seg           u16 (.clk, .op(op16), .si(si16), .cap_d(cap16), .q(q16), .so(so16));

  initial begin
    op4 = OP_HOLD; op15 = OP_HOLD; op16 = OP_HOLD;
    si4 = 0; si15 = 0; si16 = 0; cap4 = '0; cap15 = '0; cap16 = '0;
    `SEG_TEST(4, op4, si4, cap4, q4, so4)
    `SEG_TEST(15, op15, si15, cap15, q15, so15)
    `SEG_TEST(16, op16, si16, cap16, q16, so16)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
