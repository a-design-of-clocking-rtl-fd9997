`timescale 1ps/1fs
// dcc_cdl: coarse delay line (CDL) of the DCC - behavioural model.
//
// Behavioural model of an analog delay chain, not synthesizable logic. In the
// real line each unit is an inverter with a switch; the 3-bit code is turned
// into a thermometer code that selects how many units the edge passes, from 1
// to 8. The model keeps that structure: the thermometer code from
// dcc_bin2therm sets the number of stages, and every edge on `in` reaches
// `out` (non-inverted) after T_STAGE per stage. The 3-bit control, the
// thermometer decoding, the 8 stages and the ~120 ps step follow the
// published design; the non-inverting model is this implementation's choice
// (the inversion of the ring sits in the HCDL's NAND gate).
//
// Timing: transport delay (1 + ones(therm)) * T_STAGE, taken from the code
// at the time of the input edge.
//
// Line reset: while `clr` is high the output rests high and every edge still
// travelling through the line is dropped, as if each stage had a reset
// switch. The counter-based HCDL holds its line in reset while its enable is
// low, so an edge launched just before the enable fell cannot leak into the
// next measurement. The reset is this design's choice; the published line is
// described without one.
module dcc_cdl #(
  parameter int  BITS    = dcc_pkg::CDL_BITS,
  parameter real T_STAGE = 120.0             // ps per stage
) (
  input  logic            in,
  input  logic [BITS-1:0] code,
  input  logic            clr,   // line reset: back to rest (high), edges in flight dropped
  output logic            out
);
  logic [(2**BITS)-2:0] therm;
  real                  dly;

  dcc_bin2therm #(.N(BITS)) u_therm (.bin(code), .therm(therm));

  always_comb dly = T_STAGE * real'(1 + $countones(therm));

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
