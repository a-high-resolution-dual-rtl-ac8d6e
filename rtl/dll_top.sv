`timescale 1ps/1fs
// Dual-loop digital delay-locked loop (top level).
//
// Delays CLK_IN by exactly one clock period so that CLK_OUT is aligned with it.
// Coarse loop: CLK_IN runs through the 32-unit delay line (DCDL, step
// td2 = 280 ps) and the phase-interpolation range selector (PIRS, step
// td1 = 140 ps). The variable SAR (VSAR) binary-searches their code Q[6:0]
// once per SCLK = CLK_IN / 4 edge from the coarse phase detector's Comp:
// first a 5-bit search, and, each time the SAR controller finds no Lock after
// a search, a Reset and a search one bit wider (6, then 7 bits). Fine loop:
// once coarse lock is found the controller raises PI_EN, and a 7-bit up/down
// counter, clocked at SCLK / 2, steps the DAC-driven phase interpolator
// between DL_OUTA and DL_OUTB (= DL_OUTA + td2) in td2 / 128 = 2.19 ps steps,
// following the fine phase detector. At lock the counter dithers by one LSB.
// If the counter runs into a limit the controller searches the coarse code
// again and restarts the fine search.
//
// The delay line, range selector, interpolator, DAC, level converter and the
// lock-window delays are behavioural timing models; the thermometer decoders,
// dividers, phase detectors, VSAR, SAR controller and counter are
// synthesizable logic. Interface: clk_in / rst_n (async, active low; its
// release is the start of the search); clk_out; the codes and status for
// observation. The block structure follows the design description; the
// converter delay and the lock-window width are this implementation's
// assumed values.
module dll_top
  import dll_pkg::*;
#(
  parameter real         TD1_PS        = 140.0,  // LDU delay; td2 = 2 * td1
  parameter real         CONV_DELAY_PS = 500.0,  // level converter delay
  parameter real         LOCK_WIN_PS   = 140.0,  // coarse lock window +/-
  parameter int unsigned SETTLE        = 2       // SCLK edges before lock check
) (
  input  logic           clk_in,
  input  logic           rst_n,
  output logic           clk_out,
  output logic [Q_W-1:0] q,         // VSAR code
  output logic [C_W-1:0] c,         // fine counter code
  output sar_width_e     width,     // current VSAR search width
  output logic           stop,      // VSAR search finished
  output logic           lock,      // coarse phase detector lock
  output logic           reset_inc, // VSAR Reset (widen)
  output logic           vsar_cm,   // VSAR restart at same width
  output logic           pi_en,     // fine loop enabled
  output logic           fail       // 7-bit search without lock
);
  // Clocks
  logic sclk, cclk;
  // Coarse path
  logic [N_DCDU-1:0] t, tb;
  logic [N_PIRS-1:0] k, kb;
  logic dl_mid, dl_outa, dl_outb;
  // Fine path
  logic [C_W:0] i_dac_a, i_dac_b;
  logic pi_out;
  // Detectors
  logic ref_w, fb_w, comp, up, c_sat;

  clk_div #(.DIV_LOG2(2)) u_div4 (.clk_i(clk_in), .rst_n(rst_n), .clk_o(sclk));
  clk_div #(.DIV_LOG2(1)) u_div2 (.clk_i(sclk),   .rst_n(rst_n), .clk_o(cclk));

  therm_dec #(.IN_W(5), .OUT_N(N_DCDU)) u_dec32 (.bin(q[6:2]), .t(t), .tb(tb));
  therm_dec #(.IN_W(2), .OUT_N(N_PIRS)) u_dec3  (.bin(q[1:0]), .t(k), .tb(kb));

  dcdl #(.N(N_DCDU), .TD1_PS(TD1_PS)) u_dcdl (
    .clk_in(clk_in), .t(t), .tb(tb), .dl_mid(dl_mid));
  pirs #(.TD1_PS(TD1_PS)) u_pirs (
    .dl_mid(dl_mid), .k(k), .kb(kb), .dl_outa(dl_outa), .dl_outb(dl_outb));

  dac u_dac (.c(c), .i_dac_a(i_dac_a), .i_dac_b(i_dac_b));
  phase_interp #(.SPAN_PS(2.0 * TD1_PS)) u_pi (
    .dl_outa(dl_outa), .dl_outb(dl_outb), .i_a(i_dac_a), .i_b(i_dac_b), .pi_out(pi_out));
  level_conv #(.DELAY_PS(CONV_DELAY_PS)) u_conv (.in_i(pi_out), .out(clk_out));

  delay_cell #(.DELAY_PS(LOCK_WIN_PS)) u_win_ref (.in_i(clk_in),  .out(ref_w));
  delay_cell #(.DELAY_PS(LOCK_WIN_PS)) u_win_fb  (.in_i(clk_out), .out(fb_w));
  coarse_pd u_cpd (
    .ref_clk(clk_in), .fb_clk(clk_out), .ref_w(ref_w), .fb_w(fb_w),
    .rst_n(rst_n), .comp(comp), .lock(lock));
  bb_pd u_fpd (.ref_clk(clk_in), .fb_clk(clk_out), .rst_n(rst_n), .up(up));

  vsar u_vsar (
    .clk(sclk), .rst_n(rst_n), .comp(comp), .reset_inc(reset_inc),
    .restart(vsar_cm), .q(q), .stop(stop), .width(width));
  sar_ctrl #(.SETTLE(SETTLE)) u_ctrl (
    .clk(sclk), .rst_n(rst_n), .stop(stop), .lock(lock), .width(width),
    .c_sat(c_sat), .reset_inc(reset_inc), .vsar_cm(vsar_cm),
    .pi_en(pi_en), .fail(fail));
  updn_counter u_cnt (
    .clk(cclk), .rst_n(rst_n), .en(pi_en), .up(up), .c(c), .sat(c_sat));
endmodule
