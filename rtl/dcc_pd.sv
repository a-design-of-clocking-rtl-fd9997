`timescale 1ps/1fs
// dcc_pd: bang-bang phase detector of the DCC training loop.
//
// It compares the falling edge of the reference pulse CLK_FSM (one input
// period after its rising edge) with the falling edge of CLK_FB, produced by
// the training loop. It is a flip-flop clocked by the falling edge of CLK_FSM
// that samples CLK_FB: if CLK_FB is already low, the loop is faster than one
// period (CLK_FB leads) and UP is set, asking for more delay; otherwise DN.
// The flip-flop form of the detector is this implementation's choice; the
// UP/DN meaning follows the published design.
//
// Timing: UP/DN change at the falling edge of clk_ref and hold until the next.
module dcc_pd (
  input  logic clk_ref,  // CLK_FSM, reference pulse of width T_REF
  input  logic clk_fb,   // CLK_FB from the counter-based HCDL
  input  logic rst_n,    // asynchronous reset, active low
  output logic up,       // CLK_FB led: loop too short, increase delay
  output logic dn        // CLK_FSM led: loop long enough
);
  always_ff @(negedge clk_ref or negedge rst_n) begin
    if (!rst_n) up <= 1'b0;
    else        up <= ~clk_fb;
  end
  always_comb dn = ~up;
endmodule
