// tb_ref_sram: checks the reference memory.
// All 32 words are written with random data through one-hot word lines
// and SW4 on. Word lines raised with SW4 off must not write. Each word
// is then read through a one-hot SWS and compared with a model array. The
// stored[] outputs are also checked, and so is the multi_sel flag, which
// must rise when two SWS are on (shorted words give their bitwise OR).
module tb_ref_sram;
  logic                  clk = 0, drive = 0;
  logic [31:0]           wl = 0, sws = 0;
  logic [7:0]            bl_in = 0, o;
  logic                  multi_sel;
  logic [31:0][7:0]      stored;
  logic [7:0]            model [32];
  int checks = 0, failures = 0;

  ref_sram dut (.clk(clk), .wl(wl), .bl_drive(drive), .bl_in(bl_in), .sws(sws),
                .o(o), .multi_sel(multi_sel), .stored(stored));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int j = 0; j < 32; j++) begin
        @(negedge clk);
        model[j] = 8'($urandom);
        wl = 32'(1) << j; bl_in = model[j]; drive = 1;
      end
      @(negedge clk);
      // word lines without SW4: no write
      wl = '1; drive = 0; bl_in = 8'($urandom);
      @(negedge clk);
      wl = '0;
      for (int j = 0; j < 32; j++) begin
        sws = 32'(1) << j;
        #1;
        check(o == model[j], $sformatf("read word %0d o=%h exp=%h", j, o, model[j]));
        check(stored[j] == model[j], $sformatf("stored word %0d", j));
        check(!multi_sel, "single select");
      end
      sws = 32'h0;
      #1;
      check(o == 8'h0 && !multi_sel, "no select");
      sws = (32'(1) << 11) | (32'(1) << 28);
      #1;
      check(multi_sel && o == (model[11] | model[28]), "two selected are shorted");
      sws = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
