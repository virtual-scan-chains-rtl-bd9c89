// Reusable checker: one vsc_top of a given configuration, driven through a
// few virtual vectors, with the closed-form expansion of every vector and a
// cycle model of the MISR as references (same references as the end-to-end
// testbench, parameterized). It also checks the configuration against the
// real and virtual scan lengths it is meant to reproduce: m = p + n*q and
// virtual length = log2(n) + p + q.
// Ports: done rises when the run is over; checks/failures count the checks.
module vsc_cfg_check
  import vsc_pkg::*;
#(
  parameter int unsigned P = 124,
  parameter int unsigned Q = 72,
  parameter int unsigned N = 8,
  parameter int unsigned M_TABLE = 700,
  parameter int unsigned V_TABLE = 199,
  parameter int unsigned VECTORS = 3
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int unsigned SEL_W = $clog2(N), MW = N + 1;
  localparam int unsigned M = P + N * Q;
  localparam int unsigned VLEN = SEL_W + P + Q;

  logic clk = 1'b0, rst_n = 1'b1, se = 1'b0, sdi = 1'b0, sdo;
  logic [M-1:0] cap_d, scan_q;

  vsc_top #(.P(P), .Q(Q), .N_SUB(N)) dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < M; i++)
      cap_d[i] = scan_q[(i + 1) % M] ^ (scan_q[(i + 37) % M] & ~scan_q[(i + 5) % M]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 5) $display("FAIL p=%0d q=%0d n=%0d: %s", P, Q, N, what);
    end
  endtask

  bit mmisr[MW];
  int mk;

  function automatic int seg_first(int i);
    int o = 0;
    for (int j = 0; j < i; j++) o += (P / N) + ((j < int'(P % N)) ? 1 : 0);
    return o;
  endfunction

  function automatic int seg_length(int i);
    return (P / N) + ((i < int'(P % N)) ? 1 : 0);
  endfunction

  // MISR model step; the response bits are read from the DUT's cells, whose
  // contents are themselves checked against the expansion.
  task automatic misr_clock();
    bit nm[MW];
    bit fbm;
    logic [MAX_LFSR-1:0] t;
    t = lfsr_taps(MW);
    fbm = mmisr[MW-1];
    for (int i = MW - 1; i > 0; i--) nm[i] = mmisr[i-1];
    nm[0] = fbm;
    for (int i = 1; i < MW; i++) if (t[i-1]) nm[i] ^= fbm;
    if (mk >= SEL_W && mk < SEL_W + P) nm[0] ^= scan_q[P-1];
    if (mk >= SEL_W + P)
      for (int i = 0; i < N; i++) nm[i+1] ^= scan_q[P + i*Q + Q - 1];
    mmisr = nm;
    mk = (mk + 1) % VLEN;
  endtask

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

  task automatic run_vector(input int sel_val);
    bit v[VLEN];
    bit e[M];
    bit ok;
    for (int i = 0; i < VLEN; i++) v[i] = 1'($urandom);
    for (int i = 0; i < SEL_W; i++) v[i] = 1'((sel_val >> (SEL_W - 1 - i)) & 1);
    for (int i = 0; i < VLEN; i++) begin
      se = 1'b1; sdi = v[i];
      #1 check(sdo === mmisr[MW-1], "sdo");
      @(posedge clk);
      misr_clock();
      #1;
    end
    expand(v, e);
    ok = 1;
    for (int i = 0; i < M; i++) if (scan_q[i] !== e[i]) ok = 0;
    check(ok, $sformatf("expanded vector, select %0d", sel_val));
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; mk = 0;
    for (int i = 0; i < MW; i++) mmisr[i] = 0;
    check(M == M_TABLE, $sformatf("real scan length %0d, table %0d", M, M_TABLE));
    check(VLEN == V_TABLE, $sformatf("virtual scan length %0d, table %0d", VLEN, V_TABLE));
    #2 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    @(negedge clk);
    se = 1'b0;
    @(posedge clk); #1;
    for (int k = 0; k < VECTORS; k++) begin
      run_vector((k == 0) ? N - 1 : $urandom_range(0, N - 1));
      se = 1'b0;
      @(posedge clk); #1;
      mk = 0;
    end
    run_vector(0);  // flush
    done = 1;
  end
endmodule
