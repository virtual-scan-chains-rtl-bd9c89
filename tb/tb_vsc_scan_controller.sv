// Self-checking testbench of vsc_scan_controller at its default sizes.
// Drives scan enable through whole virtual vectors, back-to-back vectors
// (wrap-around), capture cycles and a reset in the middle of a vector, and
// compares every output, every cycle, with a phase computed from a cycle count
// kept here. Also checks the vector length in cycles (SEL_W + P + Q).
module tb_vsc_scan_controller;
  import vsc_pkg::*;

  localparam int unsigned P = 124, Q = 72, SEL_W = 3;
  localparam int unsigned VLEN = SEL_W + P + Q;

  logic clk = 1'b0, rst_n = 1'b1, se = 1'b0;
  logic sel_shift, misr_en, p_resp_valid, q_resp_valid;
  cell_op_e p_op, q_op;
  phase_e phase;
  int checks = 0, failures = 0;
  int k;  // expected position in the current vector

  vsc_scan_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle();
    logic e_sel, e_pv, e_qv;
    cell_op_e e_p, e_q;
    phase_e e_ph;
    if (!se) begin
      e_ph = PH_SEL; e_sel = 0; e_p = OP_CAPTURE; e_q = OP_CAPTURE; e_pv = 0; e_qv = 0;
    end else if (k < SEL_W) begin
      e_ph = PH_SEL; e_sel = 1; e_p = OP_HOLD; e_q = OP_HOLD; e_pv = 0; e_qv = 0;
    end else if (k < SEL_W + P) begin
      e_ph = PH_LOAD_P; e_sel = 0; e_p = OP_SHIFT; e_q = OP_HOLD; e_pv = 1; e_qv = 0;
    end else begin
      e_ph = PH_EXPAND; e_sel = 0; e_p = OP_LFSR; e_q = OP_SHIFT; e_pv = 0; e_qv = 1;
    end
    checks++;
    if ((se && phase !== e_ph) || sel_shift !== e_sel || p_op !== e_p || q_op !== e_q ||
        p_resp_valid !== e_pv || q_resp_valid !== e_qv || misr_en !== se) begin
      failures++;
      if (failures < 10)
        $display("mismatch se=%0b k=%0d: phase=%s sel=%0b p=%s q=%s pv=%0b qv=%0b misr=%0b",
                 se, k, phase.name(), sel_shift, p_op.name(), q_op.name(),
                 p_resp_valid, q_resp_valid, misr_en);
    end
  endtask

  // One clock with the given scan enable; checks the outputs before the edge.
  task automatic step(input logic s);
    se = s;
    #1;
    expect_cycle();
    @(posedge clk);
    #1;
    if (s) k = (k + 1) % VLEN; else k = 0;
  endtask

  int n_expand;

  initial begin
    k = 0;
    #1 rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    // Three vectors, each followed by one capture cycle.
    repeat (3) begin
      n_expand = 0;
      for (int c = 0; c < VLEN; c++) begin
        step(1'b1);
      end
      step(1'b0);
    end
    // Two vectors back to back (flush): the count must wrap after VLEN cycles.
    for (int c = 0; c < 2 * VLEN; c++) step(1'b1);
    step(1'b0);
    // Count cycles of each phase in one vector.
    begin
      int ns, np, nq;
      ns = 0; np = 0; nq = 0;
      for (int c = 0; c < VLEN; c++) begin
        se = 1'b1; #1;
        if (sel_shift) ns++;
        if (p_resp_valid) np++;
        if (q_resp_valid) nq++;
        expect_cycle();
        @(posedge clk); #1; k = (k + 1) % VLEN;
      end
      checks++;
      if (ns != SEL_W || np != P || nq != Q) begin
        failures++;
        $display("phase lengths %0d/%0d/%0d, expected %0d/%0d/%0d", ns, np, nq, SEL_W, P, Q);
      end
    end
    // Reset in the middle of a vector restarts the count.
    for (int c = 0; c < 50; c++) step(1'b1);
    rst_n = 1'b0; #1; k = 0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int c = 0; c < VLEN + 10; c++) step(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
