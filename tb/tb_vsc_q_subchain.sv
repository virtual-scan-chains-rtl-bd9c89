// Self-checking testbench of vsc_q_subchain (72 cells): capture, hold, and
// shifting with the input multiplexer switching at random between SDI
// (direct = 1) and the LFSR bit, against a shift-register model.
module tb_vsc_q_subchain;
  import vsc_pkg::*;

  localparam int unsigned Q = 72;

  logic clk = 1'b0;
  cell_op_e op = OP_HOLD;
  logic direct = 1'b0, sdi = 1'b0, lfsr_in = 1'b0, so;
  logic [Q-1:0] cap_d = '0, q, m;
  int checks = 0, failures = 0;
  int n_direct = 0, n_lfsr = 0;

  vsc_q_subchain dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1ms;
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

  initial begin
    for (int round = 0; round < 4; round++) begin
      @(negedge clk);
      op = OP_CAPTURE;
      for (int i = 0; i < Q; i++) cap_d[i] = 1'($urandom);
      m = cap_d;
      @(negedge clk);
      check(q === m, "capture");
      op = OP_HOLD; cap_d = ~cap_d;
      repeat (2) @(negedge clk);
      check(q === m, "hold");
      op = OP_SHIFT;
      for (int i = 0; i < Q + 5; i++) begin
        direct  = (round == 0) ? 1'b1 : (round == 1) ? 1'b0 : 1'($urandom);
        sdi     = 1'($urandom);
        lfsr_in = 1'($urandom);
        if (direct) n_direct++; else n_lfsr++;
        check(so === m[Q-1], "serial out");
        m = {m[Q-2:0], direct ? sdi : lfsr_in};
        @(negedge clk);
        check(q === m, $sformatf("round %0d shift %0d", round, i));
      end
      op = OP_HOLD;
    end
    check(n_direct > Q && n_lfsr > Q, "both multiplexer inputs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
