// tb_data_pe: exhaustive check of the 8-bit data encoder.
// Every input byte is applied with the matching NOR_k, both grant values
// and both PCLK values. One clock later the output must be the one-hot
// code of the lowest set bit when granted with PCLK high, and zero
// otherwise.
module tb_data_pe;
  logic       clk = 0, rst_n = 0, pclk = 0, nor_lo = 0, grant = 0;
  logic [7:0] in = 0, out;
  int checks = 0, failures = 0;

  data_pe dut (.clk(clk), .rst_n(rst_n), .pclk(pclk), .in(in), .nor_lo(nor_lo),
               .grant(grant), .out(out));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++)
      for (int v = 0; v < 256; v++) begin
        logic [7:0] exp;
        @(negedge clk);
        in = 8'(v); nor_lo = (in[3:0] == 0); grant = m[0]; pclk = m[1];
        exp = '0;
        for (int i = 7; i >= 0; i--) if (in[i]) exp = 8'(1 << i);
        if (!(grant && pclk)) exp = '0;
        @(negedge clk);
        checks++;
        if (out !== exp) begin
          failures++;
          $display("FAIL in=%b grant=%b pclk=%b out=%b exp=%b", in, grant, pclk, out, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
