`timescale 1ps/1fs
// dcc_clk_buffer: input clock buffer of the DCC test chip - behavioural model.
//
// Behavioural model of an analog receiver, not synthesizable logic. The real
// path has a differential termination, a two-stage CML input buffer (one
// stage with negative capacitive feedback), AC-coupled inverters as the
// CML-to-CMOS converter and a phase corrector, and gives the complementary
// clocks CLK_IN and CLK_INB. It has no duty-correcting feedback, so the duty
// distortion of the external source reaches the corrector unchanged. The
// model is a differential comparator with hysteresis: the output goes high
// when CLK_P is high and CLK_N low, low when CLK_P is low and CLK_N high, and
// holds otherwise; CLK_INB is its complement. `clk_mon` is the copy taken to
// a pad so the uncorrected clock can be observed.
//
// Timing: T_BUF from a differential crossing to CLK_IN / CLK_INB / clk_mon.
module dcc_clk_buffer #(
  parameter real T_BUF = 50.0   // ps
) (
  input  logic clk_p,
  input  logic clk_n,
  output logic clk_in,
  output logic clk_inb,
  output logic clk_mon
);
  initial begin
    clk_in  = 1'b0;
    clk_inb = 1'b1;
  end

  always @(clk_p or clk_n) begin
    if (clk_p && !clk_n) begin
      clk_in  <= #(T_BUF) 1'b1;
      clk_inb <= #(T_BUF) 1'b0;
    end else if (!clk_p && clk_n) begin
      clk_in  <= #(T_BUF) 1'b0;
      clk_inb <= #(T_BUF) 1'b1;
    end
  end

  always_comb clk_mon = clk_in;
endmodule
