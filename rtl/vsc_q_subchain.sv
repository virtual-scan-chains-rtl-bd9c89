// One q-bit scan sub-chain with its input multiplexer.
//
// Q scan cells of the core; cell 0 is the entry and cell Q-1 the exit (so),
// which feeds one MISR input. In OP_SHIFT the multiplexer chooses what enters
// cell 0: SDI when this sub-chain is the one named by the select register
// (direct = 1), otherwise the output of this sub-chain's LFSR. OP_CAPTURE
// loads the core's response, OP_HOLD keeps the contents (the controller holds
// the q-bit sub-chains while the select bits and LFSR seeds come in).
// The sub-chain and its multiplexer follow the published scheme; holding
// while the seeds come in is this design's choice. The cells have no reset,
// like the core flip-flops they stand for.
module vsc_q_subchain
  import vsc_pkg::*;
#(
  parameter int unsigned Q = 72
) (
  input  logic         clk,
  input  cell_op_e     op,
  input  logic         direct,
  input  logic         sdi,
  input  logic         lfsr_in,
  input  logic [Q-1:0] cap_d,
  output logic [Q-1:0] q,
  output logic         so
);

  logic din;
  assign din = direct ? sdi : lfsr_in;
  assign so  = q[Q-1];

  always_ff @(posedge clk) begin
    unique case (op)
      OP_SHIFT:   q <= (Q > 1) ? {q[Q-2:0], din} : Q'(din);
      OP_CAPTURE: q <= cap_d;
      default:    q <= q;
    endcase
  end

endmodule
