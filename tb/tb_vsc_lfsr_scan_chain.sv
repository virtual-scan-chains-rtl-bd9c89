// Self-checking testbench of vsc_lfsr_scan_chain at its default size
// (124 cells, 8 LFSRs of 16,16,16,16,15,15,15,15 cells).
// Loads random seeds serially and checks the cell contents and the serial
// output, then runs the 8 LFSRs and checks every cell and every LFSR output
// against an independent model, then checks capture and hold.
module tb_vsc_lfsr_scan_chain;
  import vsc_pkg::*;

  localparam int unsigned P = 124, N = 8;
  localparam int unsigned LEN[N] = '{16, 16, 16, 16, 15, 15, 15, 15};

  logic clk = 1'b0;
  cell_op_e op = OP_HOLD;
  logic si = 1'b0, so;
  logic [P-1:0] cap_d = '0, q, m;
  logic [N-1:0] seg_out;
  int checks = 0, failures = 0;

  vsc_lfsr_scan_chain dut (.*);

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

  // One LFSR step of every segment of the model.
  function automatic logic [P-1:0] model_step(input logic [P-1:0] s);
    logic [P-1:0] r;
    int unsigned off;
    off = 0;
    r = s;
    for (int i = 0; i < N; i++) begin
      logic [MAX_LFSR-1:0] t;
      logic fb;
      t = lfsr_taps(LEN[i]);
      fb = 1'b0;
      for (int k = 1; k <= LEN[i]; k++) if (t[k-1]) fb ^= s[off + k - 1];
      for (int j = LEN[i] - 1; j > 0; j--) r[off + j] = s[off + j - 1];
      r[off] = fb;
      off += LEN[i];
    end
    return r;
  endfunction

  function automatic logic [N-1:0] model_out(input logic [P-1:0] s);
    logic [N-1:0] o;
    int unsigned off;
    off = 0;
    for (int i = 0; i < N; i++) begin
      off += LEN[i];
      o[i] = s[off - 1];
    end
    return o;
  endfunction

  initial begin
    // Capture.
    @(negedge clk);
    op = OP_CAPTURE;
    for (int i = 0; i < P; i++) cap_d[i] = 1'($urandom);
    m = cap_d;
    @(negedge clk);
    check(q === m, "capture");
    // Serial load of P bits; the old contents appear on so, last cell first.
    op = OP_SHIFT;
    for (int i = 0; i < P; i++) begin
      si = 1'($urandom);
      check(so === m[P-1], $sformatf("serial out %0d", i));
      m = {m[P-2:0], si};
      @(negedge clk);
    end
    check(q === m, "after serial load");
    // Autonomous LFSRs.
    op = OP_LFSR;
    for (int c = 0; c < 200; c++) begin
      check(seg_out === model_out(m), $sformatf("lfsr outputs cycle %0d", c));
      m = model_step(m);
      @(negedge clk);
      check(q === m, $sformatf("lfsr state cycle %0d", c));
    end
    // Hold.
    op = OP_HOLD; si = ~si;
    repeat (5) @(negedge clk);
    check(q === m, "hold");
    check(so === m[P-1] && seg_out === model_out(m), "outputs while holding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
