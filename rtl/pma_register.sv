// pma_register: the D flip-flops that hold the word selection PMA_j.
//
// Flip-flop j takes the priority encoder output O_j as D. Its Q is PMA_j,
// which turns the read switch SWS_j on. All flip-flops load together when
// the control CLK falls from 1 to 0. The control CLK is sampled on the
// system clock, and a falling edge is detected between two samples.
//
// Pulsing CLK while the encoder output is zero clears every PMA_j. The
// write procedure does this, so that no word is connected to the outputs
// while new reference data are written.
//
// Timing: PMA loads on the first system-clock edge at which CLK is low
// after having been high. The asynchronous active-low reset clears PMA and the edge
// detector.
//
// The D input, the Q output and the load on the CLK 1->0 transition follow
// the design. The sampling on a system clock and the reset are this
// implementation's own choices.
module pma_register #(
  parameter int unsigned WORDS = am_pkg::WORDS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ctl_clk,  // control CLK
  input  logic [WORDS-1:0] d,        // priority encoder output
  output logic [WORDS-1:0] pma       // PMA_j = state of SWS_j
);
  logic ctl_clk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_clk_q <= 1'b0;
      pma       <= '0;
    end else begin
      ctl_clk_q <= ctl_clk;
      if (ctl_clk_q && !ctl_clk) pma <= d;
    end
  end
endmodule
