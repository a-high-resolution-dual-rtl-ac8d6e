`timescale 1ps/1fs
// Binary-to-thermometer decoder with complementary outputs.
//
// Output i is high when i is below the binary input value, so a value n
// turns on outputs 0..n-1: each enabled output lets the signal pass one more
// delay unit before it turns back. Every output comes with its complement
// (the Tb / Kb lines of the lattice delay units). The DLL uses two of these:
// 5-to-32 on Q[6:2] for the delay line (T0..T31) and 2-to-3 on Q[1:0] for the
// range selector (K0..K2). Purely combinational.
// The two sizes and the complementary outputs follow the design description;
// "output i high when i < value" is this implementation's reading of the
// thermometer code (with a 5-bit input T31 is then never set, and the last
// delay unit always turns the signal back).
module therm_dec #(
  parameter int unsigned IN_W  = 5,
  parameter int unsigned OUT_N = 32
) (
  input  logic [IN_W-1:0]  bin,
  output logic [OUT_N-1:0] t,
  output logic [OUT_N-1:0] tb
);
  always_comb begin
    for (int i = 0; i < OUT_N; i++)
      t[i] = (32'(i) < 32'(bin));
    tb = ~t;
  end
endmodule
