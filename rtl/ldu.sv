`timescale 1ps/1fs
// Lattice delay unit (LDU) -- behavioural timing model, not synthesizable
// logic: its function is a delay.
//
// One cell of a turn-around (lattice) delay line. With bit = 1 the signal
// entering at in_i is passed forward on path1 to the next cell and the signal
// coming back from that cell on path2 is passed on to out. With bit = 0 the
// cell turns the signal around: in_i goes straight to out. Each of the three
// gate stages takes half the LDU delay, so a turn costs TD1_PS from in_i to
// out and a pass adds TD1_PS (half forward, half on the way back).
// Interface: bit_i / bitb_i are the complementary control pair of the
// thermometer decoder. Timing: transport delays of TD1_PS / 2 per stage.
// The pass / turn-around behaviour and the LDU delay td1 follow the design
// description; the split of the delay over the stages is this model's.
module ldu #(
  parameter real TD1_PS = 140.0
) (
  input  logic in_i,
  input  logic bit_i,
  input  logic bitb_i,
  output logic path1,   // forward to the next cell
  input  logic path2,   // coming back from the next cell
  output logic out
);
  localparam real TG = TD1_PS / 2.0;
  logic turn;

  initial begin
    path1 = 1'b0;
    turn  = 1'b0;
    out   = 1'b0;
  end

  // Each stage is a transport delay: every input change is carried to the
  // stage output TG later by a process of its own, so edges closer together
  // than the delay are not lost.
  always @(posedge in_i or negedge in_i or posedge bit_i or negedge bit_i) begin
    automatic logic v = in_i & bit_i;
    fork
      #(TG) path1 = v;
    join_none
  end

  always @(posedge in_i or negedge in_i or posedge bitb_i or negedge bitb_i) begin
    automatic logic v = in_i & bitb_i;
    fork
      #(TG) turn = v;
    join_none
  end

  always @(posedge turn or negedge turn or posedge path2 or negedge path2 or posedge bit_i or negedge bit_i) begin
    automatic logic v = turn | (path2 & bit_i);
    fork
      #(TG) out = v;
    join_none
  end
endmodule
