// One LFSR/Scan segment of the p-bit scan sub-chain.
//
// L scan cells of the core that can also be wired as an L-stage LFSR.
// Cell 0 is the entry of the segment and cell L-1 its exit (so).
//   OP_SHIFT    q <= {q[L-2:0], si}: part of the serial scan path.
//   OP_LFSR     autonomous Fibonacci LFSR: every cell moves one place on and
//               cell 0 takes the XOR of the tapped cells; so (cell L-1) is the
//               bit that the segment's q-bit sub-chain shifts in this cycle.
//   OP_CAPTURE  q <= cap_d: the core's response (system clock).
//   OP_HOLD     q keeps its value.
// The feedback polynomial comes from vsc_pkg::lfsr_taps(L) and is maximal
// length; the document does not name polynomials, so this is a design choice,
// as is the Fibonacci (external XOR) form. The cells have no reset, like the
// core flip-flops they stand for: a scan load defines them.
module vsc_lfsr_scan_seg
  import vsc_pkg::*;
#(
  parameter int unsigned L = 16
) (
  input  logic         clk,
  input  cell_op_e     op,
  input  logic         si,
  input  logic [L-1:0] cap_d,
  output logic [L-1:0] q,
  output logic         so
);

  localparam logic [MAX_LFSR-1:0] TAPS = lfsr_taps(L);

  initial assert (L >= 2 && L <= MAX_LFSR)
    else $error("vsc_lfsr_scan_seg: L=%0d outside 2..%0d", L, MAX_LFSR);

  logic fb;
  assign fb = ^(q & TAPS[L-1:0]);
  assign so = q[L-1];

  always_ff @(posedge clk) begin
    unique case (op)
      OP_SHIFT:   q <= {q[L-2:0], si};
      OP_LFSR:    q <= {q[L-2:0], fb};
      OP_CAPTURE: q <= cap_d;
      default:    q <= q;
    endcase
  end

endmodule
