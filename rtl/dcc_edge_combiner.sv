`timescale 1ps/1fs
// dcc_edge_combiner: edge combiner (EC) of the DCC - behavioural model.
//
// Behavioural model of a transistor-level circuit, not synthesizable logic.
// The output rises at each rising edge of CLK_R (the duty-distorted input
// clock) and falls at each falling edge of CLK_F (the half-period-delayed
// feedback clock), so its duty cycle depends only on the timing of those two
// edges. As in the published circuit, a rising-edge detector (input NANDed
// with its delayed inverse) gives a short pulse that turns on a pMOS pull-up,
// and a falling-edge detector (NOR form) gives a pulse that turns on an nMOS
// pull-down; between pulses a keeper holds the output. The pulse width is
// the detector's inverter delay T_PULSE. If both pulses overlap the pull-up
// wins here, a choice of this model.
//
// Timing: the output moves T_EC after the detecting edge.
module dcc_edge_combiner #(
  parameter real T_PULSE = 30.0,  // ps, edge-detector pulse width
  parameter real T_EC    = 20.0   // ps, edge to output delay
) (
  input  logic clk_r,   // CLK_R: its rising edge makes the output rise
  input  logic clk_f,   // CLK_F: its falling edge makes the output fall
  output logic out      // CLK_OUT
);
  logic r_dly, f_dly;
  logic pull_up, pull_dn;

  initial begin
    r_dly = 1'b0;
    f_dly = 1'b1;
    out   = 1'b0;
  end

  always @(clk_r) r_dly <= #(T_PULSE) clk_r;
  always @(clk_f) f_dly <= #(T_PULSE) clk_f;

  // Detector pulses: rising edge of clk_r, falling edge of clk_f.
  always_comb pull_up = clk_r & ~r_dly;
  always_comb pull_dn = ~clk_f & f_dly;

  always @(posedge pull_up or posedge pull_dn) begin
    if (pull_up) out <= #(T_EC) 1'b1;
    else         out <= #(T_EC) 1'b0;
  end
endmodule
