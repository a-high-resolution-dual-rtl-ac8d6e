`timescale 1ps/1fs
// Fixed delay cell -- behavioural model of an analog delay, not synthesizable.
//
// Repeats its input after DELAY_PS (transport delay). The DLL uses two of
// them to make the delayed copies of CLK_IN and CLK_OUT that set the coarse
// phase detector's lock window. The window width is this implementation's
// choice: by default td2 / 2, the accuracy the coarse loop is meant to reach.
module delay_cell #(
  parameter real DELAY_PS = 140.0
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
