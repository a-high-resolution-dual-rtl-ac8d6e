`timescale 1ps/1fs
// SAR controller of the coarse loop.
//
// Watches the VSAR's Stop. When a binary search finishes it waits SETTLE SCLK
// edges for the delay line and the lock detector to settle on the final code,
// then judges the phase detector's Lock: if locked it raises PI_EN and the
// fine loop takes over; if not, it sends a one-cycle Reset that clears the
// VSAR and widens its search by one bit; after a failed 7-bit search it
// stops in a Fail state. In closed loop (PI_EN = 1) a saturated fine counter
// means the fine range can no longer follow the input: the controller drops
// PI_EN (which returns the fine counter to its initial code) and pulses VSAR_CM so that
// the VSAR searches again at its current width, followed by a new sequential
// search.
//
// Interface: clk is SCLK, rst_n asynchronous active low. Outputs are
// registered. Timing: Reset or PI_EN follows Stop by SETTLE+1 edges.
// Lock judgement, Reset, PI_EN, Fail and the re-search on lost lock follow
// the design description; the settle delay and counter saturation as the
// loss-of-lock test are this implementation's choices.
module sar_ctrl
  import dll_pkg::*;
#(
  parameter int unsigned SETTLE = 2     // SCLK edges between Stop and Lock check
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       stop,       // VSAR search done
  input  logic       lock,       // coarse lock from the phase detector
  input  sar_width_e width,      // VSAR width of the search just done
  input  logic       c_sat,      // fine counter at its limit
  output logic       reset_inc,  // Reset: clear VSAR and widen the search
  output logic       vsar_cm,    // restart VSAR at the same width
  output logic       pi_en,      // fine loop enable
  output logic       fail        // no lock after a 7-bit search
);
  ctrl_state_e state;
  logic [3:0]  wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CS_SEARCH;
      wait_cnt  <= '0;
      reset_inc <= 1'b0;
      vsar_cm   <= 1'b0;
      pi_en     <= 1'b0;
      fail      <= 1'b0;
    end else begin
      reset_inc <= 1'b0;
      vsar_cm   <= 1'b0;
      unique case (state)
        CS_SEARCH: begin
          wait_cnt <= '0;
          if (stop) state <= CS_JUDGE;
        end
        CS_JUDGE: begin
          if (wait_cnt == 4'(SETTLE - 1)) begin
            if (lock) begin
              pi_en <= 1'b1;
              state <= CS_TRACK;
            end else if (width == SW7) begin
              fail  <= 1'b1;
              state <= CS_FAIL;
            end else begin
              reset_inc <= 1'b1;
              state     <= CS_RESET;
            end
          end
          wait_cnt <= wait_cnt + 4'd1;
        end
        CS_RESET: begin
          // The VSAR has taken the Reset; Stop is low again from here on.
          state <= CS_SEARCH;
        end
        CS_TRACK: begin
          if (c_sat) begin
            pi_en   <= 1'b0;
            vsar_cm <= 1'b1;
            state   <= CS_RESET;
          end
        end
        default: ;  // CS_FAIL: held until reset
      endcase
    end
  end
endmodule
