`timescale 1ps/1fs
// Shared constants and types of the dual-loop digital DLL.
//
// The coarse code Q[6:0] is searched by a variable-width SAR (5, 6, then 7
// bits); Q[6:2] selects how many delay units of the 32-unit delay line are
// passed and Q[1:0] steers the phase-interpolation range selector. The fine
// code C[6:0] drives a 7-bit phase interpolator and starts at 0100000 (32).
// Widths, the initial codes and the 32-unit line follow the design description;
// the enum encodings are this implementation's choice.
package dll_pkg;
  localparam int unsigned Q_W      = 7;   // VSAR code width
  localparam int unsigned C_W      = 7;   // fine counter / DAC width
  localparam int unsigned N_DCDU   = 32;  // delay units in the coarse line
  localparam int unsigned N_PIRS   = 3;   // LDUs in the range selector
  localparam int unsigned W_FIRST  = 5;   // first binary-search width
  localparam logic [C_W-1:0] C_INIT = 7'b0100000;

  // Search width of the VSAR: 5-, 6- or 7-bit binary search.
  typedef enum logic [1:0] {
    SW5 = 2'd0,
    SW6 = 2'd1,
    SW7 = 2'd2
  } sar_width_e;

  // States of the SAR controller.
  typedef enum logic [2:0] {
    CS_SEARCH = 3'd0,  // binary search running, waiting for Stop
    CS_JUDGE  = 3'd1,  // Stop seen, letting the phase detector settle
    CS_RESET  = 3'd2,  // Reset pulse: widen the search and restart
    CS_TRACK  = 3'd3,  // coarse lock held, fine loop enabled (closed loop)
    CS_FAIL   = 3'd4   // 7-bit search did not lock
  } ctrl_state_e;

  function automatic int unsigned width_bits(sar_width_e w);
    return W_FIRST + int'(w);
  endfunction
endpackage
