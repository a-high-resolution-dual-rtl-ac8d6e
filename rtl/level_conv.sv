`timescale 1ps/1fs
// Small-swing to full-swing level converter -- behavioural model of an analog
// block: at the logic level it only repeats its input, after DELAY_PS.
//
// It restores the interpolator's small-swing output to a full-swing clock and
// drives CLK_OUT. Its delay, together with the other fixed delays of the
// output path, is part of what the loops compensate; 500 ps is this model's
// assumed value, not one given by the design description.
// Interface: in_i small-swing PI output, out full-swing CLK_OUT.
module level_conv #(
  parameter real DELAY_PS = 500.0
) (
  input  logic in_i,
  output logic out
);
  initial out = 1'b0;
  // Transport delay: each input change is carried out by a process of its own.
  always @(posedge in_i or negedge in_i) begin
    automatic logic v = in_i;
    fork
      #(DELAY_PS) out = v;
    join_none
  end
endmodule
