`timescale 1ps/1fs
// Phase-interpolation range selector (PIRS) -- behavioural timing model.
//
// Three lattice delay units in series after the delay line output DL_MID,
// controlled by the 2-to-3 thermometer code K of Q[1:0]. With k units
// passing, DL_OUTA is DL_MID delayed by (k + 1) * td1 for k = 0, 1, 2 (the
// phases p0, p1, p2 one td1 = td2 / 2 apart); the last unit loops back on
// itself, so k = 3 gives the same delay as k = 2. DL_OUTB is DL_OUTA through
// one more delay unit held in its turn-around state, i.e. td2 later. The
// phase interpolator works between the two, so the selected window overlaps
// two adjacent coarse steps and the coarse code need not toggle at a step
// boundary.
// Interface: k / kb from the 2-to-3 thermometer decoder.
// Structure, the three td1 phases and the td2 offset of DL_OUTB follow the
// design description.
module pirs
  import dll_pkg::*;
#(
  parameter real TD1_PS = 140.0
) (
  input  logic              dl_mid,
  input  logic [N_PIRS-1:0] k,
  input  logic [N_PIRS-1:0] kb,
  output logic              dl_outa,
  output logic              dl_outb
);
  logic [N_PIRS-1:0] fwd, ret, din, rin;
  logic b_fwd;

  for (genvar i = 0; i < N_PIRS; i++) begin : g_unit
    if (i == 0) begin : g_first
      assign din[i] = dl_mid;
    end else begin : g_next
      assign din[i] = fwd[i-1];
    end
    if (i == N_PIRS - 1) begin : g_last
      assign rin[i] = fwd[i];
    end else begin : g_mid
      assign rin[i] = ret[i+1];
    end
    ldu #(.TD1_PS(TD1_PS)) u_ldu (
      .in_i(din[i]), .bit_i(k[i]), .bitb_i(kb[i]),
      .path1(fwd[i]), .path2(rin[i]), .out(ret[i]));
  end

  assign dl_outa = ret[0];

  // Extra delay unit for DL_OUTB, always turning the signal around.
  dcdu #(.TD1_PS(TD1_PS)) u_dcdu_b (
    .in_i(dl_outa), .bit_i(1'b0), .bitb_i(1'b1),
    .path1(b_fwd), .path2(b_fwd), .out(dl_outb));
endmodule
