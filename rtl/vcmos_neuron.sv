// vcmos_neuron: logic equivalent of the neuron CMOS inverter of one word,
// together with its output NOR gate.
//
// In the circuit, equal capacitors C couple the BITS capacitor inputs onto a
// floating gate. With the threshold V_TH at V_DD/2 and u = C/C_T * V_DD, the
// floating-gate voltage during the compare is
//   V_F - V_TH = u * (b/2 - D + r)
// where D is the number of low capacitor inputs (the Hamming distance).
// b is 1 once SW3 has added the half-unit bias. r is the number of unit
// steps the constant current has raised the gate. The inverter switches
// when V_F > V_TH. In whole units this means D < r + b.
//
// The search_ramp block supplies the threshold `thr` = r + b. This block
// counts the low inputs and fires when that count is below `thr`. The NOR
// with F-bar passes a fired word to the multiple output MO_j only while F is
// high. The block is combinational.
//
// The floating-gate equations are the design's. Reducing them to whole
// units of u is this implementation's own step. An exact tie (V_F = V_TH,
// reached without the bias) is taken as not firing.
module vcmos_neuron #(
  parameter int unsigned BITS   = am_pkg::BITS,
  parameter int unsigned DIST_W = $clog2(BITS + 1)
) (
  input  logic [BITS-1:0]   cap_in,  // capacitor input levels, 1 = V_DD
  input  logic [DIST_W-1:0] thr,     // ramp steps + bias, in units of u
  input  logic              f,       // compare enable F (NOR with F-bar)
  output logic              mo       // multiple output MO_j
);
  logic [DIST_W-1:0] low_inputs;

  always_comb begin
    low_inputs = '0;
    for (int unsigned i = 0; i < BITS; i++)
      low_inputs = low_inputs + DIST_W'(!cap_in[i]);
  end

  assign mo = f && (low_inputs < thr);
endmodule
