// addr_decoder: write address decoder for the reference memory.
//
// Turns the 5-bit address A into the one-hot write word lines WL_j. The
// decoder only drives a word line while AD (address-decoder enable) and SW1
// (the switch between the decoder and the word lines) are both high. With
// either one low, no word line is selected and the memory holds its
// contents. The logic is purely combinational.
//
// The address width, the 32 word lines and the AD/SW1 enables come from the
// write procedure of the design. The decoder's insides (a plain compare per
// word line) are this implementation's own choice.
module addr_decoder #(
  parameter int unsigned WORDS  = am_pkg::WORDS,
  parameter int unsigned ADDR_W = am_pkg::ADDR_W
) (
  input  logic [ADDR_W-1:0] a,    // write address A
  input  logic              ad,   // decoder enable AD
  input  logic              sw1,  // switch SW1 to the word lines
  output logic [WORDS-1:0]  wl    // write word lines WL_j, one-hot or zero
);
  always_comb begin
    wl = '0;
    for (int unsigned j = 0; j < WORDS; j++)
      wl[j] = ad && sw1 && (a == ADDR_W'(j));
  end
endmodule
