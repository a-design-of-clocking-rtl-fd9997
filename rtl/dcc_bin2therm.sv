`timescale 1ps/1fs
// dcc_bin2therm: binary-to-thermometer converter for the DCC delay lines.
//
// An N-bit binary value v turns on the lowest v of 2**N-1 outputs. The coarse
// delay line uses it with N = 3 to switch in up to 7 extra stages (8 in all),
// the phase interpolator of the fine delay line with N = 5 to turn on v of its
// tri-state inverters on the late input. Combinational.
module dcc_bin2therm #(
  parameter int N = 3
) (
  input  logic [N-1:0]        bin,
  output logic [(2**N)-2:0]   therm
);
  always_comb begin
    for (int i = 0; i < (2**N) - 1; i++) therm[i] = (i < int'(bin));
  end
endmodule
