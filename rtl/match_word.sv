// match_word: bit comparison for one reference word (one row of the array).
//
// For each bit position i, the stored bit S_j,i is compared with the
// bit-line value N_i. A NAND gate with the control F drives the capacitor
// input of that bit. While F is low, every capacitor input is high (V_DD).
// Once F rises, a capacitor input goes low (0 V) exactly where N_i and
// S_j,i differ. The number of low inputs is the Hamming distance
// D_Hj = sum_i (N_i xor S_j,i).
//
// The number of low inputs is also given as `hd`, for observation. The
// block is combinational. The gating by F and the high level on a match
// follow the design's description. Using XOR for the bit comparison is
// this implementation's own choice.
module match_word #(
  parameter int unsigned BITS   = am_pkg::BITS,
  parameter int unsigned DIST_W = $clog2(BITS + 1)
) (
  input  logic [BITS-1:0]   n,       // input data N_i (bit lines)
  input  logic [BITS-1:0]   s,       // stored word S_j,i
  input  logic              f,       // compare enable F
  output logic [BITS-1:0]   cap_in,  // capacitor input levels, 1 = V_DD
  output logic [DIST_W-1:0] hd     // D_Hj while F is high, else 0
);
  always_comb begin
    hd = '0;
    for (int unsigned i = 0; i < BITS; i++) begin
      cap_in[i] = !(f && (n[i] ^ s[i]));
      hd      = hd + DIST_W'(!cap_in[i]);
    end
  end
endmodule
