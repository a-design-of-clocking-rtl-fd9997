`timescale 1ps/1fs
// dcc_clk_mux: 2:1 clock multiplexer of the DCC.
//
// The corrector uses it twice. As the switch, it feeds the counter-based HCDL
// either from the corrector output CLK_OUT (normal operation) or from the
// training pulse after its replica delay (training, D_TR high). As the 2:1 MUX
// inside the HCDL, it selects the counter output (D_H low) or the delay-line
// output directly (half-delay mode, D_H high). It is purely combinational; the
// intrinsic delay t_SW / t_MUX of the real cell is zero here.
module dcc_clk_mux (
  input  logic in0,   // selected when sel = 0
  input  logic in1,   // selected when sel = 1
  input  logic sel,
  output logic out
);
  always_comb out = sel ? in1 : in0;
endmodule
