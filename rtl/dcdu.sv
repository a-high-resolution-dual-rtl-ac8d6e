`timescale 1ps/1fs
// Digitally controlled delay unit (DCDU) -- behavioural timing model built from
// two lattice delay units (see ldu).
//
// The first LDU always passes the signal on; the second one is controlled by
// the unit's thermometer bit. With bit = 0 the signal turns around inside the
// unit and in_i reaches out after td2 = 2 * TD1_PS; with bit = 1 it is passed
// forward on path1 to the next unit and the signal returning on path2 reaches
// out, the unit adding td2 to the round trip.
// Interface: bit_i / bitb_i are one T / Tb pair of the 5-to-32 decoder.
// The two-LDU structure and td2 = 2 * td1 follow the design description;
// which of the two LDUs the bit controls is this model's reading.
module dcdu #(
  parameter real TD1_PS = 140.0
) (
  input  logic in_i,
  input  logic bit_i,
  input  logic bitb_i,
  output logic path1,
  input  logic path2,
  output logic out
);
  logic fwd, back;

  ldu #(.TD1_PS(TD1_PS)) u_ldu0 (
    .in_i(in_i), .bit_i(1'b1), .bitb_i(1'b0), .path1(fwd), .path2(back), .out(out));
  ldu #(.TD1_PS(TD1_PS)) u_ldu1 (
    .in_i(fwd), .bit_i(bit_i), .bitb_i(bitb_i), .path1(path1), .path2(path2), .out(back));
endmodule
