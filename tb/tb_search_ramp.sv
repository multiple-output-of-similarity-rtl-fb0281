// tb_search_ramp: checks the floating-gate set-up and the ramp.
// A model of the rest of the array is kept in the testbench: a set of word
// distances. MO_j is worked out here from the block's threshold, as
// D_j < thr with F high. The test checks the following. SW2 clears the ramp
// and the bias. SW3 sets the bias. With H high, the level steps once per
// clock until the nearest word fires, and then holds at the minimum
// distance, so the cycle count equals that distance. The level saturates
// at MAX_DIST when no word is close enough. CHG stops the ramp.
module tb_search_ramp;
  localparam int W = 32;
  logic           clk = 0, rst_n = 0;
  logic           sw2 = 0, sw3 = 0, h = 0, chg = 0;
  logic [W-1:0]   mo;
  logic           stop;
  logic [3:0]     level, thr;
  int             wdist [W];
  int checks = 0, failures = 0;

  search_ramp dut (.clk(clk), .rst_n(rst_n), .sw2(sw2), .sw3(sw3), .h(h), .chg(chg),
                   .mo(mo), .stop(stop), .level(level), .thr(thr));

  always #5 clk = ~clk;

  always_comb
    for (int j = 0; j < W; j++) mo[j] = (wdist[j] < int'(thr));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s level=%0d thr=%0d", what, level, thr); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < W; j++) wdist[j] = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int mind, cycles;
      mind = (trial < 9) ? trial : $urandom_range(8, 0);
      for (int j = 0; j < W; j++) wdist[j] = $urandom_range(8, mind);
      wdist[$urandom_range(W-1, 0)] = mind;
      // phase 1
      @(negedge clk); sw2 = 1;
      @(negedge clk); sw2 = 0;
      check(level == 0 && thr == 0, "SW2 clears");
      // phase 2
      sw3 = 1;
      @(negedge clk); sw3 = 0;
      check(thr == 1 && level == 0, "SW3 bias");
      // phase 3: ramp
      h = 1;
      cycles = 0;
      while (!stop && cycles < 20) begin @(negedge clk); cycles++; end
      repeat (3) @(negedge clk);  // must hold
      if (mind <= 4) begin
        check(int'(level) == mind, "level = minimum distance");
        check(cycles == mind, "one step per cycle");
        check(stop, "stop after firing");
      end else begin
        check(int'(level) == 4, "saturates at MAX_DIST");
        check(!stop, "no word fires beyond MAX_DIST");
      end
      h = 0;
    end
    // CHG halts the ramp
    for (int j = 0; j < W; j++) wdist[j] = 8;
    @(negedge clk); sw2 = 1; @(negedge clk); sw2 = 0; sw3 = 1; @(negedge clk); sw3 = 0;
    h = 1; @(negedge clk); @(negedge clk); chg = 1;
    repeat (4) @(negedge clk);
    check(level == 2 && stop, "CHG stops the ramp");
    chg = 0; h = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
