// tb_priority_encoder: checks the 32-to-32 encoder against its truth table.
// The four rows of the truth table are applied (all ones; bit 0 clear;
// bits 1..0 clear; only bit 31 set), followed by every single-bit input,
// random sparse and dense inputs, and zero. One clock after each input,
// with PCLK high, the output must be one-hot on the lowest set input bit,
// or zero for no input. With PCLK low the output must be zero.
module tb_priority_encoder;
  logic        clk = 0, rst_n = 0, pclk = 0;
  logic [31:0] in = 0, out;
  int checks = 0, failures = 0;

  priority_encoder dut (.clk(clk), .rst_n(rst_n), .pclk(pclk), .in(in), .out(out));

  always #5 clk = ~clk;

  task automatic apply(input logic [31:0] v, input logic p);
    logic [31:0] exp;
    @(negedge clk);
    in = v; pclk = p;
    exp = '0;
    for (int i = 31; i >= 0; i--) if (v[i]) exp = 32'(1) << i;
    if (!p) exp = '0;
    @(negedge clk);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL in=%h pclk=%b out=%h exp=%h", v, p, out, exp);
    end
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
    apply(32'hFFFF_FFFF, 1);
    apply(32'hFFFF_FFFE, 1);
    apply(32'hFFFF_FFFC, 1);
    apply(32'h8000_0000, 1);
    apply(32'h1800_8800, 1);   // words 11, 15, 27, 28
    apply(32'h0, 1);
    for (int i = 0; i < 32; i++) apply(32'(1) << i, 1);
    for (int t = 0; t < 500; t++) begin
      logic [31:0] v;
      v = $urandom;
      if (t % 3 == 0) v = v & $urandom & $urandom & $urandom;
      apply(v, t % 7 != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
