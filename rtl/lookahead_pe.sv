// lookahead_pe: 4-bit lookahead priority encoder (L-PE).
//
// Each input req[k] says that byte group k (inputs 8k+7..8k of the
// 32-bit encoder) holds at least one request. The output grant is one-hot
// on the lowest-numbered requesting group, or zero when no group requests.
// Only the granted group's data encoder (data_pe) may produce an output.
//
// The block is combinational. Its output register sits in the data
// encoders. The name, the 4-bit width and the position between the group
// detection and the four data encoders follow the design. The logic inside
// is this implementation's own.
module lookahead_pe #(
  parameter int unsigned GROUPS = 4
) (
  input  logic [GROUPS-1:0] req,    // group has a request
  output logic [GROUPS-1:0] grant   // one-hot: lowest requesting group
);
  // x & -x keeps only the lowest set bit
  assign grant = req & (~req + 1'b1);
endmodule
