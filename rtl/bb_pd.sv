`timescale 1ps/1fs
// Bang-bang phase detector (fine loop Up/Down; also the Comp output of the
// coarse phase detector).
//
// A flip-flop clocked by the rising edge of the reference clock CLK_IN samples
// the fed-back output clock CLK_OUT. If CLK_OUT is already high, its rising
// edge came less than half a period before the reference edge: the output is
// early and more delay is wanted, so up = 1. Otherwise up = 0 (less delay).
// Interface: rst_n asynchronous active low; up is registered in the ref
// domain and updated on every ref rising edge.
// That the detector compares CLK_IN with CLK_OUT and gives a lead/lag
// decision follows the design description; the single sampling flip-flop and
// its polarity are this implementation's choice.
// Lint reports the clocks as used both as clock and as data: that is
// intended, a phase detector samples one clock with the edge of another.
module bb_pd (
  input  logic ref_clk,   // CLK_IN
  input  logic fb_clk,    // CLK_OUT fed back
  input  logic rst_n,
  output logic up         // 1: output early, add delay
);
  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) up <= 1'b0;
    else        up <= fb_clk;
  end
endmodule
