// tb_assoc_mem_top: end-to-end test of the associative memory at its full
// size (32 words of 8 bits, no parameter overrides).
//
// The first operation is the evaluation pattern of the design. The input is
// 0000_1010. Words 11, 15, 27 and 28 are at Hamming distance 1, and every
// other word is at least 2 away (words 0, 1, 2, 30 and 31 at 3, 4, 2, 3 and
// 4). The four nearest words must fire together. The encoder must pass only
// word 11, PMA_11 must be the only PMA set, and O must read back
// 0010_1010.
//
// Random operations follow: fresh random contents with a planted nearest
// word, sometimes an exact match, sometimes several ties, and sometimes no
// word within the search range. A software model gives the distances, the
// minimum, the set of nearest words and the selected word. The testbench
// checks each of them, along with the number of ramp cycles (equal to the
// minimum distance). It also checks that a CLK pulse with PCLK low clears
// PMA before a write.
//
// Each mechanism is counted, and one that never happened counts as a
// failure: write, PMA clear, exact match, ramp steps, several nearest words
// resolved by the encoder, out of range, and a CHG stop.
module tb_assoc_mem_top;
  import am_pkg::*;

  logic                    clk = 0, rst_n = 0;
  logic [ADDR_W-1:0]       a = 0;
  logic [BITS-1:0]         n = 0;
  logic sw1 = 0, sw2 = 0, sw3 = 0, sw4 = 0, ad = 0, f = 0, h = 0, chg = 0, pclk = 0, ctl_clk = 0;
  logic [BITS-1:0]         o;
  logic [WORDS-1:0]        mo, pe_out, pma;
  logic                    stop, multi_sel;
  logic [DIST_W-1:0]       level;
  logic [WORDS-1:0][DIST_W-1:0] dh;

  assoc_mem_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_write = 0, n_clear = 0, n_exact = 0, n_ramp = 0, n_tie = 0, n_range = 0, n_chg = 0;
  logic [BITS-1:0] rf [WORDS];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int hamming(input logic [BITS-1:0] x, input logic [BITS-1:0] y);
    int c = 0;
    for (int i = 0; i < BITS; i++) if (x[i] != y[i]) c++;
    return c;
  endfunction

  // Write all words: clear PMA with a CLK pulse, then one word per cycle.
  task automatic write_all();
    @(negedge clk);
    sw1 = 1; sw4 = 1; ad = 1; pclk = 0; f = 0; h = 0;
    ctl_clk = 1;
    @(negedge clk); ctl_clk = 0;
    @(negedge clk);
    check(pma == '0, "CLK pulse during write clears PMA");
    n_clear++;
    for (int j = 0; j < WORDS; j++) begin
      a = ADDR_W'(j); n = rf[j];
      @(negedge clk);
    end
    ad = 0; sw1 = 0;
    n_write++;
  endtask

  // One search and read-out; returns nothing, checks everything.
  task automatic search(input logic [BITS-1:0] key, input bit use_chg);
    int mind, sel, cycles, ties;
    logic [WORDS-1:0] exp_mo;
    mind = BITS + 1; sel = -1;
    for (int j = 0; j < WORDS; j++)
      if (hamming(key, rf[j]) < mind) begin mind = hamming(key, rf[j]); sel = j; end
    exp_mo = '0; ties = 0;
    for (int j = 0; j < WORDS; j++)
      if (hamming(key, rf[j]) == mind && mind <= MAX_DIST) begin exp_mo[j] = 1; ties++; end
    if (mind > MAX_DIST) sel = -1;

    @(negedge clk);
    n = key; sw4 = 1;
    sw2 = 1;                    // phase 1
    @(negedge clk); sw2 = 0;
    sw3 = 1;                    // phase 2
    @(negedge clk); sw3 = 0;
    f = 1;                      // phase 3
    #1;
    for (int j = 0; j < WORDS; j++)
      check(int'(dh[j]) == hamming(key, rf[j]), $sformatf("D_H of word %0d", j));
    if (mind == 0) begin
      check(stop && mo == exp_mo, "exact match fires before the ramp");
      n_exact++;
    end
    if (use_chg) begin
      chg = 1;
      h = 1;
      repeat (3) @(negedge clk);
      check(level == 0 && stop, "CHG holds the ramp");
      n_chg++;
      chg = 0;
    end
    h = 1;
    #1;
    cycles = 0;
    while (!stop && cycles < 12) begin @(negedge clk); cycles++; end
    @(negedge clk);
    if (mind <= MAX_DIST) begin
      check(int'(level) == mind, $sformatf("level %0d = min distance %0d", level, mind));
      check(cycles == mind, $sformatf("ramp cycles %0d = min distance %0d", cycles, mind));
      if (mind > 0) n_ramp++;
    end else begin
      check(int'(level) == MAX_DIST && !stop, "no word in range: ramp saturates, none fires");
      n_range++;
    end
    check(mo == exp_mo, $sformatf("multiple output %h exp %h", mo, exp_mo));
    if (ties > 1) n_tie++;
    // select
    pclk = 1;
    @(negedge clk);
    check(pe_out == ((sel >= 0) ? (WORDS'(1) << sel) : '0), $sformatf("encoder out %h", pe_out));
    ctl_clk = 1;
    @(negedge clk);
    ctl_clk = 0; sw4 = 0;
    @(negedge clk);
    if (sel >= 0) begin
      check(pma == (WORDS'(1) << sel), $sformatf("PMA %h selects word %0d", pma, sel));
      check(o == rf[sel], $sformatf("O %h = RF_%0d %h", o, sel, rf[sel]));
    end else begin
      check(pma == '0 && o == '0, "nothing selected");
    end
    check(!multi_sel, "one word on the outputs");
    h = 0; f = 0; pclk = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;

    // evaluation pattern: RF_j = 32 + j, with the printed rows kept and the
    // unprinted ones pushed to distance 2 or more
    for (int j = 0; j < WORDS; j++) begin
      rf[j] = BITS'(32 + j);
      if (hamming(rf[j], 8'h0A) < 2) rf[j] = rf[j] | 8'hC0;
    end
    rf[11] = 8'h2A; rf[15] = 8'h0E; rf[27] = 8'h0B; rf[28] = 8'h08;
    write_all();
    check(hamming(rf[0], 8'h0A) == 3 && hamming(rf[1], 8'h0A) == 4 && hamming(rf[2], 8'h0A) == 2 &&
          hamming(rf[30], 8'h0A) == 3 && hamming(rf[31], 8'h0A) == 4, "pattern distances");
    search(8'h0A, 0);
    check(pma[11] && !pma[15] && !pma[27] && !pma[28] && o == 8'h2A, "evaluation: RF_11 read out");

    // random operations
    for (int t = 0; t < 60; t++) begin
      logic [BITS-1:0] key;
      int plant, d;
      key = BITS'($urandom);
      for (int j = 0; j < WORDS; j++) begin
        rf[j] = BITS'($urandom);
        while (hamming(rf[j], key) < 3) rf[j] = BITS'($urandom);
      end
      d = (t % 4 == 3) ? 6 : $urandom_range(2, 0);   // 6: out of range
      plant = $urandom_range(WORDS - 1, 0);
      rf[plant] = key;
      for (int k = 0; k < d; k++) rf[plant][k] = ~rf[plant][k];
      if (d == 6) for (int j = 0; j < WORDS; j++) if (hamming(rf[j], key) <= MAX_DIST) rf[j] = ~key;
      if (t % 3 == 0) rf[$urandom_range(WORDS - 1, 0)] = rf[plant];  // tie
      write_all();
      search(key, t % 5 == 1);
    end

    check(n_write > 0, "write happened");
    check(n_clear > 0, "PMA clear happened");
    check(n_exact > 0, "exact match happened");
    check(n_ramp > 0, "similarity ramp happened");
    check(n_tie > 0, "several nearest words happened");
    check(n_range > 0, "out-of-range search happened");
    check(n_chg > 0, "CHG stop happened");
    $display("mechanisms: write=%0d clear=%0d exact=%0d ramp=%0d tie=%0d out_of_range=%0d chg=%0d",
             n_write, n_clear, n_exact, n_ramp, n_tie, n_range, n_chg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
