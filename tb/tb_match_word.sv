// tb_match_word: checks the per-bit compare of one word.
// Random input and stored words are applied with F low and high. With F
// low, every capacitor input must be high and the distance zero. With F
// high, a capacitor input is low exactly on a differing bit, and the
// distance equals the number of differing bits, counted here bit by bit.
module tb_match_word;
  logic [7:0] n, s, cap_in;
  logic       f;
  logic [3:0] hd;
  int checks = 0, failures = 0;

  match_word dut (.n(n), .s(s), .f(f), .cap_in(cap_in), .hd(hd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      int cnt;
      logic [7:0] exp_cap;
      n = 8'($urandom); s = 8'($urandom); f = t[0];
      if (t == 2) begin n = 8'h0A; s = 8'h2A; end   // distance 1
      if (t == 3) begin n = 8'h0A; s = 8'h0A; end   // exact match
      if (t == 5) begin n = 8'h00; s = 8'hFF; end   // distance 8
      #1;
      cnt = 0;
      for (int i = 0; i < 8; i++) begin
        exp_cap[i] = f ? (n[i] == s[i]) : 1'b1;
        if (f && n[i] != s[i]) cnt++;
      end
      checks += 2;
      if (cap_in !== exp_cap) begin
        failures++;
        $display("FAIL cap n=%h s=%h f=%b cap=%b exp=%b", n, s, f, cap_in, exp_cap);
      end
      if (int'(hd) != cnt) begin
        failures++;
        $display("FAIL hd n=%h s=%h f=%b hd=%0d exp=%0d", n, s, f, hd, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
