// assoc_mem_top: recalling-type associative memory with a priority encoder.
//
// The memory stores WORDS reference words RF_j of BITS bits. For an input
// word N it recalls the stored word nearest in Hamming distance and drives
// that word itself onto the outputs O. The distance is found by the
// neuron-inverter threshold search. All words at the minimum distance fire
// their multiple output MO_j together. The priority encoder keeps only the
// lowest-numbered of them, and the D flip-flops (PMA) switch that single
// word onto the output lines. Without the encoder, several words would be
// shorted together on the output lines.
//
// Datapath per word j:
//   ref_sram (S_j) -> match_word (NAND with F) -> vcmos_neuron -> MO_j
//   MO -> priority_encoder (PCLK) -> pma_register (CLK) -> SWS_j -> O
// Shared by all words: addr_decoder (write word lines) and search_ramp
// (constant-current ramp and the OR gate with CHG).
//
// Control inputs are levels sampled on the system clock `clk`. The usual
// sequence is:
//  1. Write: set SW1, SW4 and AD. Pulse CLK with PCLK low, which clears all
//     PMA_j. Then, for each word, put the address on A and the data on N
//     for one cycle. Finally drop AD.
//  2. Compare: set SW4 with the input word on N. Pulse SW2 (phase 1), then
//     SW3 (phase 2). Then raise F (phase 3); exact matches fire at once.
//  3. Similarity search: raise H. The ramp rises one unit per cycle until a
//     word fires (`stop`), giving the minimum distance in `level`.
//  4. Select: raise PCLK. One cycle later the encoder output is one-hot.
//     Pulse CLK, which loads PMA on its falling edge, and drop SW4.
//  5. Read: O now equals the selected word.
// The blocks, their connections and the control names follow the circuit
// description. The single system clock, the whole-unit ramp, the reset and
// the observation outputs (mo, pe_out, dh, level, stop, multi_sel) are this
// implementation's own choices.
module assoc_mem_top
  import am_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ADDR_W-1:0]       a,         // write address A
  input  logic [BITS-1:0]         n,         // input / write data N_i
  input  logic                    sw1,       // decoder to word lines
  input  logic                    sw2,       // floating gates to V_TH
  input  logic                    sw3,       // half-unit bias
  input  logic                    sw4,       // N onto the bit lines
  input  logic                    ad,        // address decoder enable AD
  input  logic                    f,         // compare enable F
  input  logic                    h,         // similarity search H
  input  logic                    chg,       // CHG input of the OR gate
  input  logic                    pclk,      // priority encoder clock PCLK
  input  logic                    ctl_clk,   // D flip-flop clock CLK
  output logic [BITS-1:0]         o,         // read-out data O_i
  output logic [WORDS-1:0]        mo,        // multiple outputs MO_j
  output logic [WORDS-1:0]        pe_out,    // priority encoder output
  output logic [WORDS-1:0]        pma,       // PMA_j (SWS_j on)
  output logic                    stop,      // OR of MO_j and CHG
  output logic [DIST_W-1:0]       level,     // ramp steps = min distance
  output logic [WORDS-1:0][DIST_W-1:0] dh,   // D_Hj of every word (F high)
  output logic                    multi_sel  // more than one SWS_j on
);
  logic [WORDS-1:0]           wl;
  logic [WORDS-1:0][BITS-1:0] stored;
  logic [DIST_W-1:0]          thr;

  addr_decoder u_dec (
    .a   (a),
    .ad  (ad),
    .sw1 (sw1),
    .wl  (wl)
  );

  ref_sram u_sram (
    .clk       (clk),
    .wl        (wl),
    .bl_drive  (sw4),
    .bl_in     (n),
    .sws       (pma),
    .o         (o),
    .multi_sel (multi_sel),
    .stored    (stored)
  );

  for (genvar j = 0; j < WORDS; j++) begin : g_word
    logic [BITS-1:0] cap_in;

    match_word u_match (
      .n      (n),
      .s      (stored[j]),
      .f      (f),
      .cap_in (cap_in),
      .hd     (dh[j])
    );

    vcmos_neuron u_neuron (
      .cap_in (cap_in),
      .thr    (thr),
      .f      (f),
      .mo     (mo[j])
    );
  end

  search_ramp u_ramp (
    .clk   (clk),
    .rst_n (rst_n),
    .sw2   (sw2),
    .sw3   (sw3),
    .h     (h),
    .chg   (chg),
    .mo    (mo),
    .stop  (stop),
    .level (level),
    .thr   (thr)
  );

  priority_encoder #(.N(WORDS)) u_pe (
    .clk   (clk),
    .rst_n (rst_n),
    .pclk  (pclk),
    .in    (mo),
    .out   (pe_out)
  );

  pma_register u_pma (
    .clk     (clk),
    .rst_n   (rst_n),
    .ctl_clk (ctl_clk),
    .d       (pe_out),
    .pma     (pma)
  );

  // the priority encoder never lets two words onto the output lines
  a_single_word: assert property (@(posedge clk) disable iff (!rst_n) !multi_sel)
    else $error("assoc_mem_top: several words on the output lines");
endmodule
