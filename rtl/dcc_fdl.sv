`timescale 1ps/1fs
// dcc_fdl: fine delay line (FDL) of the DCC - behavioural model.
//
// Behavioural model of a phase interpolator, not synthesizable logic. The
// real FDL feeds an edge and the same edge delayed by about one CDL unit into
// a bank of tri-state inverters; a 5-bit code, made into a thermometer code
// inside the interpolator, decides how many inverters drive from the late
// edge, so the output moves in 1/32 steps across one CDL unit. The model
// computes the interpolated arrival time: T_BASE + (ones(therm)/32) * T_UNIT.
// With T_UNIT = 120 ps the step is 3.75 ps; the published step is "about
// 4.5 ps", which would make the fine range larger than one coarse step. This
// model keeps fine and coarse ranges equal so that the 8-bit code is
// monotonic, and takes the step as T_UNIT/32.
//
// Timing: transport delay from `in` to `out`, non-inverting.
//
// Line reset: while `clr` is high the output rests high and every edge still
// travelling through the line is dropped, as if each stage had a reset
// switch. The counter-based HCDL holds its line in reset while its enable is
// low, so an edge launched just before the enable fell cannot leak into the
// next measurement. The reset is this design's choice; the published line is
// described without one.
module dcc_fdl #(
  parameter int  BITS   = dcc_pkg::FDL_BITS,
  parameter real T_BASE = 20.0,    // ps, interpolator delay at code 0
  parameter real T_UNIT = 120.0    // ps, spacing of the two interpolated edges
) (
  input  logic            in,
  input  logic [BITS-1:0] code,
  input  logic            clr,   // line reset: back to rest (high), edges in flight dropped
  output logic            out
);
  logic [(2**BITS)-2:0] therm;
  real                  dly;

  dcc_bin2therm #(.N(BITS)) u_therm (.bin(code), .therm(therm));

  always_comb dly = T_BASE + T_UNIT * real'($countones(therm)) / real'(2**BITS);

  // Each input edge is delivered after the delay set at its arrival, unless
  // the line has been reset since: a reset bumps the generation number, and
  // an edge of an older generation is dropped.
  int unsigned gen;

  initial begin
    gen = 0;
    out = 1'b1;
  end
  always @(in or posedge clr) begin
    if (clr) begin
      gen <= gen + 1;
      out <= 1'b1;
    end else begin
      automatic int unsigned g = gen;
      automatic logic        v = in;
      automatic real         d = dly;
      fork
        begin
          #(d);
          if (g == gen) out <= v;
        end
      join_none
    end
  end
endmodule
