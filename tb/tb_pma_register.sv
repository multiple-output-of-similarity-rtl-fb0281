// tb_pma_register: checks the D flip-flop bank that holds PMA_j.
// D is changed at random while CLK is held high, low, or rising, and PMA
// must not change. PMA must take the value D had when CLK fell, on the
// first clock edge that sees CLK low. A CLK pulse with D all zero must
// clear PMA.
module tb_pma_register;
  logic        clk = 0, rst_n = 0, ctl_clk = 0;
  logic [31:0] d = 0, pma, model;
  int checks = 0, failures = 0;

  pma_register dut (.clk(clk), .rst_n(rst_n), .ctl_clk(ctl_clk), .d(d), .pma(pma));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (pma !== exp) begin failures++; $display("FAIL %s pma=%h exp=%h", what, pma, exp); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(32'h0, "after reset");
    model = '0;
    for (int t = 0; t < 100; t++) begin
      // CLK rises: no load
      d = $urandom; ctl_clk = 1;
      @(negedge clk);
      check(model, "CLK rise keeps PMA");
      d = $urandom;
      @(negedge clk);
      check(model, "CLK high keeps PMA");
      // CLK falls: load the D present now
      d = (t % 5 == 0) ? 32'h0 : 32'(1) << $urandom_range(31, 0);
      ctl_clk = 0;
      model = d;
      @(negedge clk);
      check(model, "CLK fall loads D");
      d = $urandom;
      @(negedge clk);
      check(model, "CLK low keeps PMA");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
