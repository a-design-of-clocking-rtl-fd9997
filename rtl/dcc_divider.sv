`timescale 1ps/1fs
// dcc_divider: divide-by-two of the input clock for DCC training.
//
// The output inverts at every rising edge of the input clock at which `en` is
// high, so a high phase lasts exactly one input period T_REF, whatever the
// duty cycle of the input. This pulse (CLK_FSM, also called CLK2) is the
// reference the training loop is compared with. At an edge where `en` is low
// the output returns low: the FSM raises `en` for single edges to cut one
// T_REF pulse per measurement, and after training the divider is idle, as
// the published design powers the training blocks down. The enable and the
// asynchronous active-low reset are choices of this implementation.
//
// Timing: the output changes one clock-to-q after each rising edge of `clk`.
module dcc_divider (
  input  logic clk,      // duty-distorted input clock (only rising edges used)
  input  logic rst_n,    // asynchronous reset, active low
  input  logic en,       // toggle enable, sampled at the rising edge
  output logic clk_div   // toggles at each enabled rising edge, reset low
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  clk_div <= 1'b0;
    else if (en) clk_div <= ~clk_div;
    else         clk_div <= 1'b0;
  end
endmodule
