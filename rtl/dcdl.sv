`timescale 1ps/1fs
// Digitally controlled delay line (DCDL) of the coarse loop -- behavioural
// timing model.
//
// N_DCDU delay units in a turn-around chain. Unit i passes the signal to unit
// i+1 when its thermometer bit T[i] is high; the first unit whose bit is low
// turns it back, and the last unit always turns it back. With n units passing
// (the decoded value of Q[6:2]), the delay from clk_in to dl_mid, taken at the
// output of unit 0, is (n + 1) * td2 with td2 = 2 * TD1_PS = 280 ps.
// Interface: t / tb from the 5-to-32 thermometer decoder.
// The 32 units, their turn-around chaining and the output at unit 0 follow
// the design description.
module dcdl
  import dll_pkg::*;
#(
  parameter int unsigned N  = N_DCDU,
  parameter real     TD1_PS = 140.0
) (
  input  logic         clk_in,
  input  logic [N-1:0] t,
  input  logic [N-1:0] tb,
  output logic         dl_mid
);
  logic [N-1:0] fwd;    // path1 of unit i, into unit i+1
  logic [N-1:0] ret;    // out of unit i, back into unit i-1
  logic [N-1:0] din;    // input of unit i
  logic [N-1:0] rin;    // path2 of unit i

  for (genvar i = 0; i < N; i++) begin : g_unit
    if (i == 0) begin : g_first
      assign din[i] = clk_in;
    end else begin : g_next
      assign din[i] = fwd[i-1];
    end
    if (i == N - 1) begin : g_last
      assign rin[i] = fwd[i];    // end of line: loop back on itself
    end else begin : g_mid
      assign rin[i] = ret[i+1];
    end
    dcdu #(.TD1_PS(TD1_PS)) u_dcdu (
      .in_i(din[i]), .bit_i(t[i]), .bitb_i(tb[i]),
      .path1(fwd[i]), .path2(rin[i]), .out(ret[i]));
  end

  assign dl_mid = ret[0];
endmodule
