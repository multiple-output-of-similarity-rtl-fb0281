// tb_addr_decoder: exhaustive check of the write address decoder.
// Every address is applied with all four combinations of AD and SW1. The
// word lines must be one-hot on the addressed word when both enables are
// high, and all low otherwise.
module tb_addr_decoder;
  logic [4:0]  a;
  logic        ad, sw1;
  logic [31:0] wl;
  int checks = 0, failures = 0;

  addr_decoder dut (.a(a), .ad(ad), .sw1(sw1), .wl(wl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 4; e++)
      for (int k = 0; k < 32; k++) begin
        logic [31:0] exp;
        a = 5'(k); ad = e[0]; sw1 = e[1];
        #1;
        exp = (e == 3) ? (32'd1 << k) : 32'd0;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("FAIL a=%0d ad=%b sw1=%b wl=%h exp=%h", a, ad, sw1, wl, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
