`timescale 1ps/1fs
// 7-bit up/down counter of the fine loop.
//
// Holds the fine code C[6:0] that sets the phase interpolator through the
// DAC. While PI_EN is low the counter is held at its initial code 0100000
// (32), the middle-low point of the interpolator range. While PI_EN is high
// it makes one sequential-search step per clock edge: +1 when Up/Down = 1
// (output early, more delay wanted), -1 otherwise. At the lock point this
// gives the one-LSB dither the closed loop tracks with. The counter stops at
// 0 and 127 instead of wrapping, and flags sat when it sits at a limit and
// the detector still asks to go past it.
//
// Interface: clk is SCLK / 2, rst_n asynchronous active low; c and sat are
// registered / derived from registers. Timing: one step per clock edge.
// Width, initial code, the PI_EN enable and the one-step sequential search
// follow the design description; saturation at the limits and the sat flag
// are this implementation's choice.
module updn_counter
  import dll_pkg::*;
#(
  parameter int unsigned            W    = C_W,
  parameter logic [C_W-1:0]         INIT = C_INIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,     // PI_EN
  input  logic         up,     // Up/Down from the fine phase detector
  output logic [W-1:0] c,
  output logic         sat     // at a limit and asked to go past it
);
  localparam logic [W-1:0] CMAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      c <= W'(INIT);
    else if (!en)    c <= W'(INIT);
    else if (up)     c <= (c == CMAX) ? c : c + W'(1);
    else             c <= (c == '0)   ? c : c - W'(1);
  end

  assign sat = en && ((up && c == CMAX) || (!up && c == '0));
endmodule
