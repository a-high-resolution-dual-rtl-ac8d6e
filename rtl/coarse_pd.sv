`timescale 1ps/1fs
// Phase detector of the coarse loop: Comp and Lock.
//
// Comp is the lead/lag decision of a bang-bang detector (see bb_pd): 1 when
// the output clock is early and the SAR should keep the bit under trial.
// Lock tells whether the output edge lies within +/- W of the reference edge,
// where W is the delay of the window cells that produce ref_w (CLK_IN delayed
// by W) and fb_w (CLK_OUT delayed by W) outside this module. With the output
// edge at time e relative to a reference edge, sampling CLK_IN at the edge of
// fb_w gives 1 for e in [-W, T/2-W), and sampling ref_w at the edge of CLK_OUT
// gives 0 for e in [W-T/2, W); both together mean e in [-W, W). The result,
// made in the CLK_OUT domain, is passed to the CLK_IN domain through two
// flip-flops.
// Interface: rst_n asynchronous active low; comp and lock are registered on
// CLK_IN rising edges. Timing: lock follows a phase change after about three
// CLK_IN periods.
// That this detector provides Comp and Lock follows the design description;
// the window method and its synchronizer are this implementation's choice.
// Lint reports the clocks as used both as clock and as data: that is
// intended, a phase detector samples one clock with the edge of another.
module coarse_pd (
  input  logic ref_clk,   // CLK_IN
  input  logic fb_clk,    // CLK_OUT
  input  logic ref_w,     // CLK_IN delayed by the lock window
  input  logic fb_w,      // CLK_OUT delayed by the lock window
  input  logic rst_n,
  output logic comp,      // 1: output early, more delay
  output logic lock       // output edge within the window
);
  logic late_ok;    // CLK_IN high at fb + W: edge not later than W past ref
  logic early_bad;  // CLK_IN+W high at fb: edge more than W before ref
  logic lock_s1;

  bb_pd u_comp (.ref_clk(ref_clk), .fb_clk(fb_clk), .rst_n(rst_n), .up(comp));

  always_ff @(posedge fb_w or negedge rst_n) begin
    if (!rst_n) late_ok <= 1'b0;
    else        late_ok <= ref_clk;
  end

  always_ff @(posedge fb_clk or negedge rst_n) begin
    if (!rst_n) early_bad <= 1'b1;
    else        early_bad <= ref_w;
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_s1 <= 1'b0;
      lock    <= 1'b0;
    end else begin
      lock_s1 <= late_ok && !early_bad;
      lock    <= lock_s1;
    end
  end
endmodule
