`timescale 1ps/1fs
// 7-bit binary-weighted current-steering DAC -- behavioural model of an analog
// block; the currents are given as integer multiples of the LSB current.
//
// Each code bit c[j] steers a current source of weight 2^j either to the B
// side (bit set) or to the A side (bit clear); one extra unit source always
// feeds side A. So I_DAC_B = C and I_DAC_A = 128 - C, and the sum is a constant
// 128 LSB: the interpolator's weight C / 128 moves its output from DL_OUTA
// (C = 0) towards DL_OUTB in 2^7 steps.
// Interface: c is the fine counter code C[6:0]; purely combinational.
// The binary-weighted current steering and the two bias currents follow the
// design description; the always-on unit on side A is this model's choice,
// made so that the two currents add up to a constant.
module dac
  import dll_pkg::*;
(
  input  logic [C_W-1:0] c,
  output logic [C_W:0]   i_dac_a,   // LSB units
  output logic [C_W:0]   i_dac_b    // LSB units
);
  always_comb begin
    i_dac_a = (C_W+1)'(1);
    i_dac_b = '0;
    for (int j = 0; j < C_W; j++) begin
      if (c[j]) i_dac_b += (C_W+1)'(1) << j;
      else      i_dac_a += (C_W+1)'(1) << j;
    end
  end
endmodule
