// Self-checking testbench of vsc_select_reg (W = 3): random shift/hold
// sequences against a model that keeps the last W bits shifted in, first bit
// in the most significant position; reset clears the register.
module tb_vsc_select_reg;
  localparam int unsigned W = 3;
  logic clk = 1'b0, rst_n = 1'b1, shift = 1'b0, sdi = 1'b0;
  logic [W-1:0] sel;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  vsc_select_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #1; rst_n = 1'b0; #1;  // an explicit edge for the asynchronous reset
    checks++;
    if (sel !== '0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      shift = $urandom_range(0, 3) != 0;
      sdi   = 1'($urandom);
      @(posedge clk);
      if (shift) model = {model[W-2:0], sdi};
      #1;
      checks++;
      if (sel !== model) begin
        failures++;
        $display("cycle %0d: sel=%b expected %b", i, sel, model);
      end
    end
    // A fixed pattern: 1,0,0 shifted in gives 3'b100 (first bit is the MSB).
    @(negedge clk); shift = 1'b1;
    sdi = 1'b1; @(negedge clk); sdi = 1'b0; @(negedge clk); sdi = 1'b0; @(negedge clk);
    shift = 1'b0;
    checks++;
    if (sel !== 3'b100) begin failures++; $display("pattern: sel=%b", sel); end
    rst_n = 1'b0; #1;
    checks++;
    if (sel !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
