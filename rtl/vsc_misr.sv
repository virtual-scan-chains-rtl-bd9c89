// Multiple-input signature register that drives SDO.
//
// W-stage internal-XOR (Galois) MISR with N_IN parallel inputs, N_IN <= W.
// On each enabled clock every stage moves one place on, the last stage's bit
// (the feedback) is XORed back into stage 0 and into the stages that the
// polynomial vsc_pkg::lfsr_taps(W) names, and input d[i] is XORed into
// stage i. The feedback bit is also the SDO pin, so the compacted response
// leaves the core serially, like the output of an ordinary scan chain.
// Compacting all sub-chain outputs in a MISR whose feedback bit is SDO
// follows the published scheme. With en low the register holds; asynchronous active-low reset clears it.
// The width (default one stage per input) and the polynomial are this
// design's choices.
module vsc_misr
  import vsc_pkg::*;
#(
  parameter int unsigned W    = 9,
  parameter int unsigned N_IN = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [N_IN-1:0] d,
  output logic            sdo
);

  localparam logic [MAX_LFSR-1:0] TAPS = lfsr_taps(W);

  initial assert (N_IN <= W && W >= 2 && W <= MAX_LFSR)
    else $error("vsc_misr: need N_IN <= W and 2 <= W <= %0d", MAX_LFSR);

  logic [W-1:0] sig;
  logic [W-1:0] nxt;
  logic         fb;

  assign fb  = sig[W-1];
  assign sdo = fb;

  always_comb begin
    nxt = {sig[W-2:0], 1'b0};
    // Stage k (1-based) of the polynomial is register bit k; bit 0 always
    // takes the feedback (constant term), bit W is the feedback itself.
    nxt[0] = nxt[0] ^ fb;
    for (int unsigned k = 1; k < W; k++) begin
      if (TAPS[k-1]) nxt[k] = nxt[k] ^ fb;
    end
    nxt[N_IN-1:0] = nxt[N_IN-1:0] ^ d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sig <= '0;
    else if (en) sig <= nxt;
  end

endmodule
