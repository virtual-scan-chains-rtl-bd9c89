// End-to-end testbench of vsc_top at its default parameters (p = 124,
// q = 72, 8 sub-chains: 700 real scan cells behind a 199-cycle virtual scan
// chain).
//
// The tester side shifts virtual vectors in on sdi with se high, then drops
// se for one capture clock. A stand-in for the core's logic, a fixed
// nonlinear function of the scan cells, drives cap_d.
// Two independent references are kept:
//  * a cycle-by-cycle model of all cells, the select register and the MISR,
//    written with plain bit arrays, against which scan_q and sdo are compared
//    on every clock;
//  * a closed-form expansion of each virtual vector (select field, seeds
//    stepped q times, LFSR output streams, the direct field) against which the
//    700 cells are compared once the vector's 199th bit is in.
// Mechanisms counted, each must occur: every select value, LFSR expansion,
// capture, back-to-back vectors without capture, a final flush vector, and a
// reset in the middle of a vector.
module tb_vsc_top;
  import vsc_pkg::*;

  localparam int unsigned P = 124, Q = 72, N = 8, SEL_W = 3, MW = N + 1;
  localparam int unsigned M = P + N * Q;
  localparam int unsigned VLEN = SEL_W + P + Q;

  logic clk = 1'b0, rst_n = 1'b1, se = 1'b0, sdi = 1'b0, sdo;
  logic [M-1:0] cap_d, scan_q;

  vsc_top dut (.*);

  always #5 clk = ~clk;

  // Stand-in for the core's combinational logic.
  always_comb
    for (int i = 0; i < M; i++)
      cap_d[i] = scan_q[(i + 1) % M] ^ (scan_q[(i + 37) % M] & ~scan_q[(i + 5) % M]);

  int checks = 0, failures = 0;
  int n_sel[N];
  int n_expand = 0, n_capture = 0, n_backtoback = 0, n_flush = 0, n_reset = 0;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------- reference model ----------------
  bit          mq[M];       // cells
  bit [SEL_W-1:0] msel;
  bit          mmisr[MW];
  int          mk;          // cycle within the vector

  function automatic int seg_first(int i);
    int o = 0;
    for (int j = 0; j < i; j++) o += (P / N) + ((j < P % N) ? 1 : 0);
    return o;
  endfunction

  function automatic int seg_length(int i);
    return (P / N) + ((i < P % N) ? 1 : 0);
  endfunction

  // Model of one clock with scan enable s and scan input b.
  task automatic model_clock(input bit s, input bit b);
    bit nq[M];
    bit nm[MW];
    bit fbm;
    nq = mq;
    if (!s) begin
      for (int i = 0; i < M; i++) nq[i] = cap_d[i];
      mk = 0;
    end else begin
      // MISR first, from the current cell values.
      fbm = mmisr[MW-1];
      for (int i = MW - 1; i > 0; i--) nm[i] = mmisr[i-1];
      nm[0] = fbm;
      begin
        logic [MAX_LFSR-1:0] t = lfsr_taps(MW);
        for (int i = 1; i < MW; i++) if (t[i-1]) nm[i] ^= fbm;
      end
      if (mk >= SEL_W && mk < SEL_W + P) nm[0] ^= mq[P-1];
      if (mk >= SEL_W + P)
        for (int i = 0; i < N; i++) nm[i+1] ^= mq[P + i*Q + Q - 1];
      mmisr = nm;
      if (mk < SEL_W) begin
        msel = {msel[SEL_W-2:0], b};
      end else if (mk < SEL_W + P) begin
        for (int j = P - 1; j > 0; j--) nq[j] = mq[j-1];
        nq[0] = b;
      end else begin
        for (int i = 0; i < N; i++) begin
          int o = seg_first(i), l = seg_length(i);
          logic [MAX_LFSR-1:0] t = lfsr_taps(l);
          bit fb = 0;
          bit in_bit;
          for (int k = 1; k <= l; k++) if (t[k-1]) fb ^= mq[o + k - 1];
          for (int j = l - 1; j > 0; j--) nq[o + j] = mq[o + j - 1];
          nq[o] = fb;
          in_bit = (int'(msel) == i) ? b : mq[o + l - 1];
          for (int j = Q - 1; j > 0; j--) nq[P + i*Q + j] = mq[P + i*Q + j - 1];
          nq[P + i*Q] = in_bit;
        end
      end
      mk = (mk + 1) % VLEN;
    end
    mq = nq;
  endtask

  // Compare the DUT with the cycle model.
  task automatic compare(input string what);
    bit ok = 1;
    for (int i = 0; i < M; i++) if (scan_q[i] !== mq[i]) ok = 0;
    check(ok, {what, ": cells"});
    check(sdo === mmisr[MW-1], {what, ": sdo"});
  endtask

  // Closed-form expansion of virtual vector v (v[0] shifted first).
  function automatic void expand(input bit v[VLEN], output bit exp_q[M]);
    int s = 0;
    for (int i = 0; i < SEL_W; i++) s = (s << 1) | int'(v[i]);
    for (int j = 0; j < P; j++) exp_q[j] = v[SEL_W + P - 1 - j];
    for (int i = 0; i < N; i++) begin
      int o = seg_first(i), l = seg_length(i);
      logic [MAX_LFSR-1:0] t = lfsr_taps(l);
      bit st[MAX_LFSR];
      bit outs[Q];
      for (int j = 0; j < l; j++) st[j] = exp_q[o + j];
      for (int c = 0; c < Q; c++) begin
        bit fb = 0;
        outs[c] = st[l-1];
        for (int k = 1; k <= l; k++) if (t[k-1]) fb ^= st[k-1];
        for (int j = l - 1; j > 0; j--) st[j] = st[j-1];
        st[0] = fb;
      end
      for (int j = 0; j < l; j++) exp_q[o + j] = st[j];
      for (int j = 0; j < Q; j++)
        exp_q[P + i*Q + j] = (s == i) ? v[SEL_W + P + Q - 1 - j] : outs[Q - 1 - j];
    end
  endfunction

  // ---------------- stimulus ----------------
  task automatic clock(input bit s, input bit b);
    se = s; sdi = b;
    @(posedge clk);
    model_clock(s, b);
    #1;
    compare(s ? "shift" : "capture");
  endtask

  task automatic shift_vector(input int sel_val, output bit v[VLEN]);
    bit e[M];
    bit ok;
    for (int i = 0; i < VLEN; i++) v[i] = 1'($urandom);
    for (int i = 0; i < SEL_W; i++) v[i] = 1'((sel_val >> (SEL_W - 1 - i)) & 1);
    for (int i = 0; i < VLEN; i++) clock(1'b1, v[i]);
    expand(v, e);
    ok = 1;
    for (int i = 0; i < M; i++) if (scan_q[i] !== e[i]) ok = 0;
    check(ok, $sformatf("expanded vector, select %0d", sel_val));
    n_sel[sel_val]++;
    n_expand++;
  endtask

  bit v[VLEN];

  initial begin
    mk = 0; msel = '0;
    for (int i = 0; i < MW; i++) mmisr[i] = 0;
    #2 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    // Define the cells with one capture, as a core's flip-flops would be after
    // functional operation; the model takes the same values.
    @(negedge clk);
    se = 1'b0;
    @(posedge clk); #1;
    for (int i = 0; i < M; i++) mq[i] = scan_q[i];
    // One vector per select value, each followed by a capture.
    for (int s = 0; s < N; s++) begin
      shift_vector(s, v);
      clock(1'b0, 1'b0);
      n_capture++;
    end
    // Two vectors back to back without a capture in between.
    shift_vector($urandom_range(0, N-1), v);
    shift_vector($urandom_range(0, N-1), v);
    n_backtoback++;
    clock(1'b0, 1'b0);
    n_capture++;
    // Reset in the middle of a vector: the controller, select register and
    // MISR restart, the cells keep their contents.
    for (int i = 0; i < 40; i++) clock(1'b1, 1'($urandom));
    @(negedge clk);
    rst_n = 1'b0; #1 rst_n = 1'b1;
    mk = 0; msel = '0;
    for (int i = 0; i < MW; i++) mmisr[i] = 0;
    n_reset++;
    compare("after reset");
    shift_vector(5, v);
    clock(1'b0, 1'b0);
    n_capture++;
    // Flush: a dummy vector shifts the last response out through the MISR.
    shift_vector(0, v);
    n_flush++;
    // Every named mechanism must have happened.
    for (int s = 0; s < N; s++) check(n_sel[s] > 0, $sformatf("select %0d never used", s));
    check(n_expand > 0, "no LFSR expansion");
    check(n_capture > 0, "no capture");
    check(n_backtoback > 0, "no back-to-back vectors");
    check(n_flush > 0, "no flush vector");
    check(n_reset > 0, "no reset");
    $display("vectors=%0d captures=%0d back-to-back=%0d flush=%0d resets=%0d",
             n_expand, n_capture, n_backtoback, n_flush, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
