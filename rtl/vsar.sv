`timescale 1ps/1fs
// Variable successive approximation register (VSAR) of the coarse loop.
//
// A binary search on the coarse code Q[6:0], one decision per SCLK edge. The
// search starts narrow: 5 bits (Q[4:0], first trial 10000 = 16), and each
// Reset pulse from the SAR controller clears Q and widens it by one bit
// (Q[5:0] from 100000 = 32, then Q[6:0] from 1000000 = 64). Starting with a
// short delay range keeps the loop from locking to a multiple of the clock
// period. On every edge the bit under trial is kept when Comp = 1 (output
// clock early: more delay wanted) and cleared when Comp = 0; then the next
// lower bit is set on trial. After the last bit Stop goes high and Q holds.
//
// Interface: clk is SCLK (CLK_IN / 4); rst_n is asynchronous, active low;
// reset_inc is the controller's Reset (clear and widen); restart (VSAR_CM)
// clears Q and runs the search again at the current width, used to re-lock.
// Timing: Q = 0 for one edge after a (re)start, then one new trial code per
// edge; an n-bit search sets Stop n+1 edges after the trial start.
// The widths, initial codes and the Reset-and-increase behaviour follow the
// design description; the restart input and the exact cycle timing are this
// implementation's choice.
module vsar
  import dll_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           comp,       // 1: output leads, more delay needed
  input  logic           reset_inc,  // Reset: clear Q, widen search by 1 bit
  input  logic           restart,    // VSAR_CM: clear Q, same width
  output logic [Q_W-1:0] q,
  output logic           stop,       // binary search finished
  output sar_width_e     width       // current search width
);
  typedef enum logic [1:0] {VS_ARM, VS_RUN, VS_DONE} vs_state_e;
  vs_state_e   state;
  logic [2:0]  bit_idx;              // bit under trial

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      stop    <= 1'b0;
      width   <= SW5;
      state   <= VS_ARM;
      bit_idx <= '0;
    end else if (reset_inc || restart) begin
      q     <= '0;
      stop  <= 1'b0;
      state <= VS_ARM;
      if (reset_inc && width != SW7)
        width <= sar_width_e'(width + 2'd1);
    end else begin
      unique case (state)
        VS_ARM: begin
          bit_idx <= 3'(width_bits(width) - 1);
          q       <= Q_W'(1) << (width_bits(width) - 1);
          state   <= VS_RUN;
        end
        VS_RUN: begin
          if (!comp) q[bit_idx] <= 1'b0;
          if (bit_idx == 3'd0) begin
            stop  <= 1'b1;
            state <= VS_DONE;
          end else begin
            q[bit_idx - 3'd1] <= 1'b1;
            bit_idx           <= bit_idx - 3'd1;
          end
        end
        default: ;  // VS_DONE: hold Q and Stop
      endcase
    end
  end
endmodule
