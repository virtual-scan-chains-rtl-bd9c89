// Select register of the virtual scan chain.
//
// A W-bit shift register that takes SDI during the first W shift cycles of a
// virtual scan vector. The bit shifted in first ends up as the most
// significant bit of sel (this bit order is this design's choice). sel names
// the q-bit sub-chain that is loaded straight from SDI during the last q shift
// cycles; the other sub-chains are filled by their LFSRs. The register holds
// whenever shift is low. Asynchronous active-low reset clears it.
module vsc_select_reg #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sdi,
  output logic [W-1:0] sel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sel <= '0;
    else if (shift) sel <= (W > 1) ? {sel[W-2:0], sdi} : W'(sdi);
  end

endmodule
