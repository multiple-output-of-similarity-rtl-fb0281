// priority_encoder: 32-to-32 one-hot priority encoder, clocked by PCLK.
//
// Output O_j is high for the lowest index j with IN_j high, and all
// outputs are zero when no input is high. The lowest index has the highest
// priority. Among several nearest reference words, this picks the one
// stored first.
//
// Structure:
//  * The input is split into four bytes. For byte k, NOR_k flags an empty
//    lower nibble IN<8k+3:8k>, and a group request flags a non-empty byte.
//  * A 4-bit lookahead encoder (lookahead_pe) grants the lowest requesting
//    byte.
//  * Four 8-bit data encoders (data_pe) each get their byte, NOR_k and
//    their grant, and produce O<8k+7:8k>.
//
// Timing: the outputs are registered in the data encoders. They follow the
// input one clock cycle later while PCLK is high, and are zero while PCLK
// is low.
//
// The truth table, the 32-bit width and the byte/nibble split into L-PE
// and D-PE follow the design. The register timing is this implementation's
// own choice.
module priority_encoder #(
  parameter int unsigned N = 32   // must be a multiple of 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pclk,     // PCLK
  input  logic [N-1:0] in,       // IN_j
  output logic [N-1:0] out       // O_j, one-hot or zero
);
  localparam int unsigned G = N / 8;

  logic [G-1:0] nor_lo, nor_hi, grp_req, grant;

  always_comb
    for (int unsigned k = 0; k < G; k++) begin
      nor_lo[k]  = ~|in[8*k   +: 4];
      nor_hi[k]  = ~|in[8*k+4 +: 4];
      grp_req[k] = !(nor_lo[k] && nor_hi[k]);
    end

  lookahead_pe #(.GROUPS(G)) u_lpe (
    .req   (grp_req),
    .grant (grant)
  );

  for (genvar k = 0; k < G; k++) begin : g_dpe
    data_pe u_dpe (
      .clk    (clk),
      .rst_n  (rst_n),
      .pclk   (pclk),
      .in     (in[8*k +: 8]),
      .nor_lo (nor_lo[k]),
      .grant  (grant[k]),
      .out    (out[8*k +: 8])
    );
  end

  // at most one word is ever selected
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out))
    else $error("priority_encoder: output not one-hot");
endmodule
