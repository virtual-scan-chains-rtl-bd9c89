// Scan controller of the virtual scan chain.
//
// One virtual scan vector is SEL_W + P + Q shift cycles long and is laid out
// as [select bits | LFSR seeds | bits for the directly loaded q-bit
// sub-chain], the first field entering first. The controller counts shift
// cycles (SE high) and decodes the count into three phases:
//   PH_SEL     cycles 0 .. SEL_W-1        SDI goes into the select register;
//                                         all scan cells hold.
//   PH_LOAD_P  next P cycles              the p-bit sub-chain shifts SDI in
//                                         (and its response out).
//   PH_EXPAND  last Q cycles              the p-bit sub-chain runs as n
//                                         autonomous LFSRs and every q-bit
//                                         sub-chain shifts (one from SDI).
// The MISR steps on every shift cycle; the response-valid outputs tell it which
// sub-chain outputs carry response bits in the current cycle.
//
// With SE low the count returns to zero and all scan cells capture. After the
// last cycle of a vector the count wraps, so vectors may follow each other
// without a capture in between (a flush vector at the end of a test set).
// The wrap and the hold of the q-bit sub-chains during the first two phases are
// this design's choices; the phase order and lengths follow the vector format.
//
// Timing: the phase is a decode of a register, so it holds for the whole cycle
// and the datapath acts on the rising edge that ends that cycle.
module vsc_scan_controller
  import vsc_pkg::*;
#(
  parameter int unsigned P     = 124,
  parameter int unsigned Q     = 72,
  parameter int unsigned SEL_W = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     se,
  output logic     sel_shift,
  output cell_op_e p_op,
  output cell_op_e q_op,
  output logic     misr_en,
  output logic     p_resp_valid,
  output logic     q_resp_valid,
  output phase_e   phase
);

  localparam int unsigned VLEN  = SEL_W + P + Q;
  localparam int unsigned CNT_W = $clog2(VLEN);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              cnt <= '0;
    else if (!se)                            cnt <= '0;
    else if (cnt == CNT_W'(VLEN - 1))        cnt <= '0;
    else                                     cnt <= cnt + 1'b1;
  end

  always_comb begin
    if (cnt < CNT_W'(SEL_W))          phase = PH_SEL;
    else if (cnt < CNT_W'(SEL_W + P)) phase = PH_LOAD_P;
    else                              phase = PH_EXPAND;
  end

  always_comb begin
    sel_shift    = 1'b0;
    p_op         = OP_CAPTURE;
    q_op         = OP_CAPTURE;
    misr_en      = se;
    p_resp_valid = 1'b0;
    q_resp_valid = 1'b0;
    if (se) begin
      unique case (phase)
        PH_SEL: begin
          sel_shift = 1'b1;
          p_op      = OP_HOLD;
          q_op      = OP_HOLD;
        end
        PH_LOAD_P: begin
          p_op         = OP_SHIFT;
          q_op         = OP_HOLD;
          p_resp_valid = 1'b1;
        end
        default: begin
          p_op         = OP_LFSR;
          q_op         = OP_SHIFT;
          q_resp_valid = 1'b1;
        end
      endcase
    end
  end

endmodule
