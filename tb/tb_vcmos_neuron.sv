// tb_vcmos_neuron: checks the firing rule of the neuron inverter.
// For every number of low capacitor inputs (0..8, at random positions),
// every threshold 0..9 and both values of F, the floating-gate voltage is
// worked out in real numbers: V_TH = V_DD/2, V_DD = 1.8 V, C_T = 10 C, as
// V_F = V_TH + u*(b/2 - D + r) with u = C/C_T*V_DD. Here thr = r + b, with
// b = 1 when thr is odd and 0 otherwise. MO must be high exactly when F is
// high and V_F > V_TH.
module tb_vcmos_neuron;
  logic [7:0] cap_in;
  logic [3:0] thr;
  logic       f, mo;
  int checks = 0, failures = 0;

  vcmos_neuron dut (.cap_in(cap_in), .thr(thr), .f(f), .mo(mo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vdd, vth, u, vf;
    vdd = 1.8; vth = vdd / 2.0; u = vdd / 10.0;
    for (int d = 0; d <= 8; d++)
      for (int t = 0; t <= 9; t++)
        for (int fv = 0; fv < 2; fv++) begin
          int b, r, placed;
          logic exp;
          cap_in = 8'hFF;
          placed = 0;
          while (placed < d) begin
            int p;
            p = $urandom_range(7, 0);
            if (cap_in[p]) begin cap_in[p] = 1'b0; placed++; end
          end
          b = t % 2; r = (t - b);     // any split with r + b = t gives the same sum
          vf = vth + u * (0.5 * b - d + r);
          thr = 4'(t); f = fv[0];
          #1;
          exp = f && (vf > vth + 1e-9);
          checks++;
          if (mo !== exp) begin
            failures++;
            $display("FAIL d=%0d thr=%0d f=%b mo=%b exp=%b vf=%f", d, t, f, mo, exp, vf);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
