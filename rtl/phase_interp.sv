`timescale 1ps/1fs
// Phase interpolator (PI) -- behavioural timing model of an analog block.
//
// Produces a clock whose edges lie between those of DL_OUTA and DL_OUTB, the
// position set by the DAC bias currents: edge = A + (B - A) * I_B / (I_A + I_B).
// The model measures the A-to-B spacing on each rising edge pair (initially
// SPAN_PS, the nominal td2 = 280 ps) and repeats every edge of A after that
// fraction of it. With the 7-bit DAC one step is td2 / 2^7 = 2.1875 ps, and
// the initial code 32 gives the 70 ps initial delay.
// Interface: dl_outa, dl_outb from the range selector, i_a / i_b from the DAC
// in LSB units. Timing: transport delay, updated with the currents.
// The weighting by the two DAC currents and the resolution follow the design
// description; the model is ideal (linear, no intrinsic delay), whereas the
// real interpolator is only monotonic, within about 1.1 LSB differential and
// 2.7 LSB integral nonlinearity.
module phase_interp
  import dll_pkg::*;
#(
  parameter real SPAN_PS = 280.0
) (
  input  logic         dl_outa,
  input  logic         dl_outb,
  input  logic [C_W:0] i_a,
  input  logic [C_W:0] i_b,
  output logic         pi_out
);
  realtime t_a;
  real     span;
  real     dly;

  initial begin
    t_a    = 0.0;
    span   = SPAN_PS;
    pi_out = 1'b0;
  end

  always @(posedge dl_outa) t_a = $realtime;
  always @(posedge dl_outb) if ($realtime > t_a) span = $realtime - t_a;

  always_comb begin
    if (i_a + i_b == '0) dly = 0.0;
    else                 dly = span * real'(i_b) / real'(i_a + i_b);
  end

  // Transport delay: each edge of DL_OUTA is repeated by a process of its own,
  // after the delay that the currents set at that moment.
  always @(posedge dl_outa or negedge dl_outa) begin
    automatic logic v = dl_outa;
    automatic real  d = dly;
    fork
      #(d) pi_out = v;
    join_none
  end
endmodule
