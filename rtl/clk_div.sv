`timescale 1ps/1fs
// Power-of-two clock divider.
//
// A DIV_LOG2-bit ripple-free binary counter on the input clock whose top bit
// is the divided clock, giving a 50 % duty cycle. The DLL uses two: CLK_IN / 4
// gives SCLK for the VSAR and the SAR controller, and SCLK / 2 clocks the fine
// up/down counter. The ratios follow the design description; the counter
// implementation and the reset to a low output are this implementation's.
// Interface: rst_n asynchronous active low. Timing: clk_o rises on the
// 2^(DIV_LOG2-1)-th rising edge of clk_i after reset, then every 2^DIV_LOG2.
module clk_div #(
  parameter int unsigned DIV_LOG2 = 2
) (
  input  logic clk_i,
  input  logic rst_n,
  output logic clk_o
);
  logic [DIV_LOG2-1:0] cnt;

  always_ff @(posedge clk_i or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + DIV_LOG2'(1);
  end

  assign clk_o = cnt[DIV_LOG2-1];
endmodule
