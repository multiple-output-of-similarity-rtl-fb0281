// search_ramp: logic equivalent of the floating-gate set-up and of the
// constant-current ramp shared by all words in the similarity search.
//
// Phases, as the controls step through them:
//  * SW2 high (phase 1): every floating gate is tied to its inverter's
//    threshold, V_F = V_TH. The step count r and the bias b are cleared.
//  * SW3 high with SW2 low (phase 2): the extra capacitor lifts every gate
//    by half a unit, b = 1.
//  * H high (phase 3, similarity search): the current mirror charges all
//    floating gates together. Here the ramp is one whole unit per clock
//    cycle, r = r + 1, until the stop signal rises or r reaches MAX_DIST.
// The stop signal is the OR of all multiple outputs MO_j and of CHG. It
// rises as soon as the nearest words fire, so the ramp freezes with
// r = (minimum Hamming distance) when the bias is set.
//
// Output `thr` = r + b goes to every vcmos_neuron. `level` reports r.
// Timing: one step per clock edge, with synchronous clear by SW2 and an
// active-low asynchronous reset.
//
// The phases, the half-unit bias and the limit of four distances follow
// the design. The OR gate with CHG is in the design, but its use as the
// stop of the ramp, one step per clock, and the reset are this
// implementation's own choices.
module search_ramp #(
  parameter int unsigned WORDS    = am_pkg::WORDS,
  parameter int unsigned DIST_W   = am_pkg::DIST_W,
  parameter int unsigned MAX_DIST = am_pkg::MAX_DIST
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sw2,    // floating gates to V_TH (phase 1)
  input  logic              sw3,    // half-unit bias (phase 2)
  input  logic              h,      // similarity search: ramp enable
  input  logic              chg,    // extra input of the OR gate
  input  logic [WORDS-1:0]  mo,     // multiple outputs MO_j
  output logic              stop,   // OR of all MO_j and CHG
  output logic [DIST_W-1:0] level,  // ramp steps r
  output logic [DIST_W-1:0] thr     // r + b
);
  logic bias;

  assign stop = chg || (|mo);
  assign thr  = level + DIST_W'(bias);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level <= '0;
      bias  <= 1'b0;
    end else if (sw2) begin
      level <= '0;
      bias  <= 1'b0;
    end else begin
      if (sw3) bias <= 1'b1;
      if (h && !stop && level < DIST_W'(MAX_DIST)) level <= level + 1'b1;
    end
  end
endmodule
