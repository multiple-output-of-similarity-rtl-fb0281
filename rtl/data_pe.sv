// data_pe: 8-bit data priority encoder (D-PE), clocked by PCLK.
//
// The block takes one byte of the encoder input, IN<8k+7:8k>, and NOR_k.
// NOR_k is high when the lower nibble IN<8k+3:8k> holds no request. The
// block also takes its group grant from the lookahead encoder. When the
// group is granted, the one-hot code of the lowest set input bit is formed.
// It is taken from the lower nibble unless NOR_k says that nibble is empty,
// and from the upper nibble otherwise.
//
// Timing: PCLK works like the clock phase of a precharged stage. While
// PCLK is high, the output register loads the code on every clock edge
// (evaluate). While PCLK is low, the register is cleared (precharge), so
// the outputs are all zero. This gives one clock cycle of latency.
//
// The inputs IN, NOR_k, the grant and PCLK follow the design. The
// precharge behaviour while PCLK is low, and the register sampled on the
// system clock, are this implementation's own choices.
module data_pe (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pclk,     // PCLK: high = evaluate, low = precharge
  input  logic [7:0] in,       // IN<8k+7:8k>
  input  logic       nor_lo,   // NOR_k: IN<8k+3:8k> all zero
  input  logic       grant,    // group granted by the lookahead encoder
  output logic [7:0] out       // O<8k+7:8k>, one-hot or zero
);
  logic [3:0] nib;
  logic [3:0] nib_first;
  logic [7:0] code;

  always_comb begin
    nib       = nor_lo ? in[7:4] : in[3:0];
    nib_first = nib & (~nib + 1'b1);
    code      = nor_lo ? {nib_first, 4'b0000} : {4'b0000, nib_first};
    if (!grant) code = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     out <= '0;
    else if (pclk)  out <= code;
    else            out <= '0;
  end
endmodule
