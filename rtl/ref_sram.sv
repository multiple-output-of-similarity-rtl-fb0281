// ref_sram: the WORDS x BITS SRAM that holds the reference data RF_j.
//
// Each bit S_j,i is an SRAM cell. Transfer gates, opened by word line WL_j,
// connect it to bit line BL_i and to its complement. The bit lines carry the input data N
// while SW4 is on. Raising word line WL_j then stores N into word j on the
// next clock edge. Several word lines may be high at once, and all of them
// are written.
//
// Reading uses the SWS_j switches. A high PMA_j connects word j to the
// output lines, so O = RF_j. All words are also presented on stored[], the
// outputs that feed the per-word match logic.
//
// If more than one SWS_j is on, the selected words are shorted together on
// the output lines. This model returns the bitwise OR of those words and
// raises `multi_sel`. The priority encoder in front of the PMA register
// exists to keep this from happening.
//
// Timing: the write takes one clock cycle, and the read path is
// combinational. There is no reset, because the memory content is data.
module ref_sram #(
  parameter int unsigned WORDS = am_pkg::WORDS,
  parameter int unsigned BITS  = am_pkg::BITS
) (
  input  logic                       clk,
  input  logic [WORDS-1:0]           wl,        // write word lines WL_j
  input  logic                       bl_drive,  // SW4: bit lines driven by N
  input  logic [BITS-1:0]            bl_in,     // input data N_i on the bit lines
  input  logic [WORDS-1:0]           sws,       // read switches SWS_j (= PMA_j)
  output logic [BITS-1:0]            o,         // read-out data O_i
  output logic                       multi_sel, // more than one SWS_j on
  output logic [WORDS-1:0][BITS-1:0] stored     // S_j,i of every word
);
  logic [BITS-1:0] mem [WORDS];

  always_ff @(posedge clk)
    for (int unsigned j = 0; j < WORDS; j++)
      if (wl[j] && bl_drive) mem[j] <= bl_in;

  always_comb begin
    o = '0;
    for (int unsigned j = 0; j < WORDS; j++) begin
      stored[j] = mem[j];
      if (sws[j]) o = o | mem[j];
    end
  end

  assign multi_sel = (sws & (sws - 1'b1)) != '0;
endmodule
