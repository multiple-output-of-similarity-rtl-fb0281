// tb_lookahead_pe: exhaustive check of the 4-bit lookahead encoder.
// For every request pattern, the grant must be one-hot on the lowest set
// request bit, found here by a scan from bit 0, and zero with no request.
module tb_lookahead_pe;
  logic [3:0] req, grant;
  int checks = 0, failures = 0;

  lookahead_pe dut (.req(req), .grant(grant));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      logic [3:0] exp;
      req = 4'(r);
      #1;
      exp = '0;
      for (int k = 3; k >= 0; k--) if (req[k]) exp = 4'(1 << k);
      checks++;
      if (grant !== exp) begin
        failures++;
        $display("FAIL req=%b grant=%b exp=%b", req, grant, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
