`timescale 1ps/1fs
// dcc_core: wide-range digital duty-cycle corrector with counter-based HCDL.
//
// The output CLK_OUT rises with every rising edge of the duty-distorted input
// CLK_IN and falls half an input period later, so its duty cycle is 50 %
// whatever the input's. The edge combiner (EC) makes both edges; the falling
// one comes from CLK_FB, the output fed back through the counter-based
// half-cycle delay line (HCDL), which must delay it by exactly T_REF/2 less
// the intrinsic delays of the loop.
//
// Two modes, selected by D_TR from the FSM:
//  * Training (34 input cycles after reset or `train_req`): the switch feeds
//    the HCDL with the FSM's one-period pulse CLK_FSM, through a replica of
//    the intrinsic delays missing from this loop. The FSM first counts how
//    many ring periods fit in one input period at maximum delay (N_CNT
//    training), then binary-searches the 8-bit delay code so that the
//    training loop equals one period, using the phase detector (PD).
//  * Normal: the switch feeds the HCDL from CLK_OUT, the count is halved
//    (or half-delay mode is set) and the loop gives half a period.
// The block structure (EC, HCDL, switch, divider, PD, FSM, replica) and both
// modes follow the published design. In this model the switch, the MUX and
// the counter are zero-delay logic, so the replica is 2*T_EC.
//
// Interface: `clk_in` is the only clock; `rst_n` is asynchronous, active low.
// `locked` rises 34 rising edges of clk_in after reset release, when
// training ends.
module dcc_core #(
  parameter int  CODE_W     = dcc_pkg::CODE_W,
  parameter int  CNT_W      = dcc_pkg::CNT_W,
  parameter int  NCNT_MAX   = dcc_pkg::NCNT_MAX,
  parameter real T_EC       = 20.0,     // ps, edge combiner delay
  parameter real T_PULSE    = 30.0,     // ps, edge-detector pulse width
  parameter real T_NAND     = 20.0,     // ps, ring NAND delay
  parameter real T_CDL      = 120.0,    // ps, coarse step
  parameter real T_FDL_BASE = 20.0      // ps, interpolator base delay
) (
  input  logic              clk_in,      // CLK_IN, duty-distorted
  input  logic              rst_n,
  input  logic              train_req,   // retrain (sampled in normal operation)
  output logic              clk_out,     // CLK_OUT, duty-corrected
  output logic              locked,      // normal operation
  output logic              d_h,         // half-delay mode in use
  output logic [CODE_W-1:0] code,        // trained DCDL code
  output logic [CNT_W-1:0]  ncnt_train,  // training count C = 2*N_CNT
  output logic [CNT_W-1:0]  cnt_target,  // counter target in use
  output logic              pd_up,       // phase detector decision
  output logic              clk_fb       // CLK_FB, for observation
);
  localparam real T_REP = 2.0 * T_EC;

  logic clk_fsm, clk_fsm_rep, d_tr, hcdl_en, clk_dl;
  logic [CNT_W-1:0] cnt_capt;
  dcc_pkg::dcc_state_e state;

  dcc_fsm #(.CODE_W(CODE_W), .CNT_W(CNT_W), .NCNT_MAX(NCNT_MAX)) u_fsm (
    .clk        (clk_in),
    .rst_n      (rst_n),
    .train_req  (train_req),
    .cnt_capt   (cnt_capt),
    .pd_up      (pd_up),
    .clk_fsm    (clk_fsm),
    .d_tr       (d_tr),
    .d_h        (d_h),
    .locked     (locked),
    .code       (code),
    .cnt_target (cnt_target),
    .ncnt_train (ncnt_train),
    .state      (state)
  );

  dcc_replica_delay #(.T_REP(T_REP)) u_rep (.in (clk_fsm), .out (clk_fsm_rep));

  // Switch: normal loop from CLK_OUT, training loop from the replica.
  dcc_clk_mux u_sw (.in0 (clk_out), .in1 (clk_fsm_rep), .sel (d_tr), .out (hcdl_en));

  dcc_hcdl #(
    .CODE_W (CODE_W), .CNT_W (CNT_W), .T_NAND (T_NAND), .T_CDL (T_CDL),
    .T_FDL_BASE (T_FDL_BASE)
  ) u_hcdl (
    .en       (hcdl_en),
    .rst_n    (rst_n),
    .code     (code),
    .target   (cnt_target),
    .d_h      (d_h),
    .clk_fb   (clk_fb),
    .clk_dl   (clk_dl),
    .cnt_capt (cnt_capt)
  );

  dcc_pd u_pd (.clk_ref (clk_fsm), .clk_fb (clk_fb), .rst_n (rst_n), .up (pd_up), .dn ());

  dcc_edge_combiner #(.T_PULSE (T_PULSE), .T_EC (T_EC)) u_ec (
    .clk_r (clk_in), .clk_f (clk_fb), .out (clk_out)
  );
endmodule
