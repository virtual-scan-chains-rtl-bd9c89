// Test-cube testbench: drives the default 700-idx virtual scan chain the way
// a test generator would use it.
//
// For each random test cube (a target value for a random subset of the 700
// cells, the rest don't-care) it:
//  1. builds, for every LFSR segment i, the linear system over GF(2) that
//     ties the segment's seed bits to the specified cells of the segment and
//     of q-bit sub-chain i (each idx's value is a known XOR of seed bits,
//     found by running the LFSR symbolically on bit masks);
//  2. solves each system by Gaussian elimination;
//  3. if no system fails, loads a random sub-chain directly; if exactly one
//     fails, makes that sub-chain the directly loaded one and solves its
//     segment for the p-bit cells alone; if more than one fails, the cube
//     cannot be applied with these LFSR sizes and is counted as rejected;
//  4. assembles the virtual vector (select, seeds, direct bits), shifts it in
//     and checks every specified idx of the 700.
// The cases "all LFSRs solvable", "one unsolvable, routed to SDI" and
// "rejected" must each occur.
module tb_vsc_test_cubes;
  import vsc_pkg::*;

  localparam int unsigned P = 124, Q = 72, N = 8, SEL_W = 3;
  localparam int unsigned M = P + N * Q;
  localparam int unsigned VLEN = SEL_W + P + Q;
  localparam int unsigned CUBES = 100;

  typedef logic [MAX_LFSR-1:0] mask_t;

  logic clk = 1'b0, rst_n = 1'b1, se = 1'b0, sdi = 1'b0, sdo;
  logic [M-1:0] cap_d, scan_q;

  vsc_top dut (.*);

  always #5 clk = ~clk;

  assign cap_d = ~scan_q;

  int checks = 0, failures = 0;
  int n_all_solved = 0, n_one_direct = 0, n_rejected = 0;

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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Symbolic masks: for idx j of segment i, the XOR of seed bits that it
  // holds at the end of a vector; likewise for idx j of q-bit sub-chain i
  // when it is fed by its LFSR.
  mask_t pmask[P];
  mask_t qmask[N][Q];

  function automatic int seg_first(int i);
    int o = 0;
    for (int j = 0; j < i; j++) o += (P / N) + ((j < P % N) ? 1 : 0);
    return o;
  endfunction

  function automatic int seg_length(int i);
    return (P / N) + ((i < P % N) ? 1 : 0);
  endfunction

  task automatic build_masks();
    for (int i = 0; i < N; i++) begin
      int o = seg_first(i), l = seg_length(i);
      mask_t t = lfsr_taps(l);
      mask_t st[MAX_LFSR];
      mask_t outs[Q];
      for (int j = 0; j < l; j++) begin st[j] = '0; st[j][j] = 1'b1; end
      for (int c = 0; c < Q; c++) begin
        mask_t fb = '0;
        outs[c] = st[l-1];
        for (int k = 1; k <= l; k++) if (t[k-1]) fb ^= st[k-1];
        for (int j = l - 1; j > 0; j--) st[j] = st[j-1];
        st[0] = fb;
      end
      for (int j = 0; j < l; j++) pmask[o + j] = st[j];
      for (int j = 0; j < Q; j++) qmask[i][j] = outs[Q - 1 - j];
    end
  endtask

  // Gaussian elimination over GF(2) on rows {mask, rhs}; returns 1 and a
  // seed when the system is consistent (free variables random).
  function automatic bit gf2_solve(input mask_t a[$], input bit b[$], input int l, output mask_t x);
    int r = 0;
    int pivcol[$];
    x = '0;
    for (int c = 0; c < l && r < a.size(); c++) begin
      int piv = -1;
      for (int k = r; k < a.size(); k++) if (a[k][c]) begin piv = k; break; end
      if (piv < 0) continue;
      begin
        mask_t tm = a[piv]; bit tb = b[piv];
        a[piv] = a[r]; b[piv] = b[r]; a[r] = tm; b[r] = tb;
      end
      for (int k = 0; k < a.size(); k++)
        if (k != r && a[k][c]) begin a[k] ^= a[r]; b[k] ^= b[r]; end
      pivcol.push_back(c);
      r++;
    end
    for (int k = r; k < a.size(); k++) if (b[k]) return 0;
    for (int c = 0; c < l; c++) x[c] = 1'($urandom);
    // Back-substitute: pivot variable = rhs ^ (free variables in its row).
    for (int k = r - 1; k >= 0; k--) begin
      bit v = b[k];
      for (int c = 0; c < l; c++) if (c != pivcol[k] && a[k][c]) v ^= x[c];
      x[pivcol[k]] = v;
    end
    return 1;
  endfunction

  // One cube: spec[i] says whether idx i is specified, val[i] its value.
  bit spec[M], val[M];

  task automatic make_cube();
    for (int i = 0; i < M; i++) begin spec[i] = 0; val[i] = 1'($urandom); end
    for (int i = 0; i < N; i++) begin
      int l = seg_length(i);
      // Mostly few specified bits; now and then more than the LFSR can hold.
      int k = ($urandom_range(0, 5) == 0) ? l + $urandom_range(2, 10) : $urandom_range(0, l - 3);
      for (int n = 0; n < k; n++) begin
        int idx;
        if ($urandom_range(0, 3) == 0) idx = seg_first(i) + $urandom_range(0, l - 1);
        else idx = P + i * Q + $urandom_range(0, Q - 1);
        spec[idx] = 1;
      end
    end
  endtask

  task automatic build_system(input int i, input bit with_q, output mask_t a[$], output bit b[$]);
    int o = seg_first(i), l = seg_length(i);
    a = {}; b = {};
    for (int j = 0; j < l; j++)
      if (spec[o + j]) begin a.push_back(pmask[o + j]); b.push_back(val[o + j]); end
    if (with_q)
      for (int j = 0; j < Q; j++)
        if (spec[P + i*Q + j]) begin a.push_back(qmask[i][j]); b.push_back(val[P + i*Q + j]); end
  endtask

  task automatic apply_cube();
    mask_t seed[N];
    bit ok[N];
    int nbad = 0, s = -1;
    bit v[VLEN];
    for (int i = 0; i < N; i++) begin
      mask_t a[$]; bit b[$];
      build_system(i, 1, a, b);
      ok[i] = gf2_solve(a, b, seg_length(i), seed[i]);
      if (!ok[i]) begin nbad++; s = i; end
    end
    if (nbad > 1) begin
      n_rejected++;
      return;
    end
    if (nbad == 0) begin
      s = $urandom_range(0, N - 1);
      n_all_solved++;
    end else begin
      mask_t a[$]; bit b[$];
      build_system(s, 0, a, b);
      check(gf2_solve(a, b, seg_length(s), seed[s]), "p-bit cells alone are always solvable");
      n_one_direct++;
    end
    // Virtual vector.
    for (int i = 0; i < SEL_W; i++) v[i] = 1'((s >> (SEL_W - 1 - i)) & 1);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < seg_length(i); j++)
        v[SEL_W + P - 1 - (seg_first(i) + j)] = seed[i][j];
    for (int j = 0; j < Q; j++)
      v[SEL_W + P + Q - 1 - j] = spec[P + s*Q + j] ? val[P + s*Q + j] : 1'($urandom);
    for (int i = 0; i < VLEN; i++) begin
      se = 1'b1; sdi = v[i];
      @(posedge clk); #1;
    end
    begin
      bit good = 1;
      for (int i = 0; i < M; i++) if (spec[i] && scan_q[i] !== val[i]) good = 0;
      check(good, $sformatf("specified bits of the cube (direct sub-chain %0d)", s));
    end
    se = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    build_masks();
    #2 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    for (int c = 0; c < CUBES; c++) begin
      make_cube();
      apply_cube();
    end
    check(n_all_solved > 0, "no cube with all LFSRs solvable");
    check(n_one_direct > 0, "no cube with one sub-chain routed to SDI");
    check(n_rejected > 0, "no cube rejected");
    $display("cubes: all solvable %0d, one direct %0d, rejected %0d",
             n_all_solved, n_one_direct, n_rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
