// The p-bit LFSR/Scan sub-chain.
//
// P scan cells split into N segments (vsc_lfsr_scan_seg). For loading, the
// segments form one serial chain: SDI enters segment 0 and the output of
// segment i feeds segment i+1; the last segment's output (so) goes to the
// MISR. In OP_LFSR the serial links are not used and every segment runs as an
// autonomous LFSR; seg_out[i] is the bit segment i hands to q-bit sub-chain i.
// The split is as even as possible, the first (P mod N) segments being one
// cell longer (for the default 124 cells over 8 LFSRs: four of 16, four of 15);
// the document gives only the total p, so the split is this design's choice.
// q[seg_off(i)+j] is cell j of segment i.
module vsc_lfsr_scan_chain
  import vsc_pkg::*;
#(
  parameter int unsigned P = 124,
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  cell_op_e     op,
  input  logic         si,
  input  logic [P-1:0] cap_d,
  output logic [P-1:0] q,
  output logic [N-1:0] seg_out,
  output logic         so
);

  logic [N:0] link;
  assign link[0] = si;

  for (genvar i = 0; i < N; i++) begin : g_seg
    localparam int unsigned LEN = seg_len(P, N, i);
    localparam int unsigned OFF = seg_off(P, N, i);
    vsc_lfsr_scan_seg #(.L(LEN)) u_seg (
      .clk   (clk),
      .op    (op),
      .si    (link[i]),
      .cap_d (cap_d[OFF +: LEN]),
      .q     (q[OFF +: LEN]),
      .so    (link[i+1])
    );
    assign seg_out[i] = link[i+1];
  end

  assign so = link[N];

endmodule
