`timescale 1ps/1fs
// dcc_replica_delay: replica delay of the DCC training loop - behavioural model.
//
// Behavioural model of analog delay cells, not synthesizable logic. In
// training the loop runs from the reference pulse CLK_FSM through the switch
// and the HCDL to the phase detector, without the edge combiner and without
// the second set of intrinsic delays that one full period of normal
// operation contains. The replica delays CLK_FSM by those missing delays,
// 2*t_EC + t_CNT + t_MUX + t_SW, so that the loop locked to one period gives
// exactly half a period in normal operation. The published design places
// these replica cells between the FSM and the HCDL; their delay value here is
// a parameter set by the instantiating corrector.
//
// Timing: transport delay T_REP from `in` to `out`, non-inverting.
module dcc_replica_delay #(
  parameter real T_REP = 40.0   // ps
) (
  input  logic in,
  output logic out
);
  initial out = 1'b0;
  always @(in) out <= #(T_REP) in;
endmodule
