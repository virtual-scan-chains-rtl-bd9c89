// Virtual scan chain of a core.
//
// To the outside this is one ordinary scan chain: scan enable (se), scan data
// in (sdi), scan data out (sdo). Inside are M = P + N_SUB*Q real scan cells,
// but a test vector takes only VLEN = SEL_W + P + Q shift cycles, where
// SEL_W = log2(N_SUB). Each virtual vector carries, first bit first:
//   SEL_W select bits  -> select register (picks one q-bit sub-chain)
//   P seed bits        -> the p-bit sub-chain, shifted serially
//   Q data bits        -> the selected q-bit sub-chain, directly
// During those last Q cycles the p-bit sub-chain runs as N_SUB autonomous
// LFSRs, and LFSR i fills q-bit sub-chain i (unless that one is selected).
// At the end of the vector all M cells hold the expanded test vector;
// dropping se for one clock captures the core's response (cap_d). While the
// next vector shifts in, the old contents of the p-bit and q-bit sub-chains
// shift out into the MISR, whose feedback bit is sdo.
//
// scan_q/cap_d order: bits [P-1:0] are the p-bit sub-chain (segment i at
// vsc_pkg::seg_off(P, N_SUB, i)), then q-bit sub-chain i at P + i*Q. Within
// each run, the lower index is nearer the scan input.
//
// Defaults are the 8-sub-chain configuration of the s13207 benchmark
// (700 real cells, 199-bit virtual chain: p = 124, q = 72). MISR width
// (N_SUB + 1), LFSR polynomials, and the bit/segment orderings are this
// design's choices. The core's combinational logic sits outside: it reads
// scan_q and drives cap_d.
module vsc_top
  import vsc_pkg::*;
#(
  parameter int unsigned P      = 124,
  parameter int unsigned Q      = 72,
  parameter int unsigned N_SUB  = 8,
  parameter int unsigned MISR_W = N_SUB + 1,
  localparam int unsigned SEL_W = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned M     = P + N_SUB * Q
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         se,
  input  logic         sdi,
  output logic         sdo,
  input  logic [M-1:0] cap_d,
  output logic [M-1:0] scan_q
);

  initial assert (N_SUB >= 2 && (1 << SEL_W) == N_SUB && P >= 2 * N_SUB)
    else $error("vsc_top: N_SUB must be a power of two and P >= 2*N_SUB");

  logic             sel_shift, misr_en, p_resp_valid, q_resp_valid;
  cell_op_e         p_op, q_op;
  phase_e           phase;
  logic [SEL_W-1:0] sel;
  logic [N_SUB-1:0] lfsr_out, q_so;
  logic             p_so;
  logic [N_SUB:0]   misr_d;

  vsc_scan_controller #(.P(P), .Q(Q), .SEL_W(SEL_W)) u_ctrl (
    .clk, .rst_n, .se,
    .sel_shift, .p_op, .q_op, .misr_en, .p_resp_valid, .q_resp_valid, .phase
  );

  vsc_select_reg #(.W(SEL_W)) u_sel (
    .clk, .rst_n, .shift(sel_shift), .sdi, .sel
  );

  vsc_lfsr_scan_chain #(.P(P), .N(N_SUB)) u_pchain (
    .clk,
    .op      (p_op),
    .si      (sdi),
    .cap_d   (cap_d[P-1:0]),
    .q       (scan_q[P-1:0]),
    .seg_out (lfsr_out),
    .so      (p_so)
  );

  for (genvar i = 0; i < N_SUB; i++) begin : g_q
    vsc_q_subchain #(.Q(Q)) u_qchain (
      .clk,
      .op      (q_op),
      .direct  (sel == SEL_W'(i)),
      .sdi,
      .lfsr_in (lfsr_out[i]),
      .cap_d   (cap_d[P + i*Q +: Q]),
      .q       (scan_q[P + i*Q +: Q]),
      .so      (q_so[i])
    );
  end

  // The select register may change only while the select bits come in.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (phase != PH_SEL) |=> $stable(sel))
    else $error("vsc_top: select register changed outside the select phase");

  // MISR input 0 takes the p-bit sub-chain, inputs 1..N_SUB the q-bit ones;
  // an input is zero in the cycles its sub-chain is not shifting.
  assign misr_d = {q_so & {N_SUB{q_resp_valid}}, p_so & p_resp_valid};

  vsc_misr #(.W(MISR_W), .N_IN(N_SUB + 1)) u_misr (
    .clk, .rst_n, .en(misr_en), .d(misr_d), .sdo
  );

endmodule
