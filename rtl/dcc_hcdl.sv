`timescale 1ps/1fs
// dcc_hcdl: counter-based half-cycle delay line (HCDL) - behavioural model.
//
// A conventional half-cycle delay line needs a delay line as long as half the
// period of the slowest clock. Here a short digitally controlled delay line
// (DCDL = coarse line + fine line, delay t_DL set by an 8-bit code) is closed
// into a ring through a NAND gate and reused: while `en` is high the ring
// oscillates with period 2*t_DL, and the counter counts the rising edges of
// its output CLK_DL. At the N-th rising edge, 2*N*t_DL after `en` rose, the
// counter pulls CLK_FB low. When `en` falls the NAND stops the ring and the
// counter clears, so CLK_FB returns high; one NAND delay later the delay line
// is reset to rest, dropping any edge still inside it. Without that reset an
// edge launched into a long line (up to 1.1 ns) would come out after the
// enable had risen again and be counted in the next measurement; the reset
// is this design's choice.
//
// In half-delay mode (d_h = 1) the 2:1 MUX passes CLK_DL itself to CLK_FB,
// whose first falling edge comes after a single pass, t_DL: the line behaves
// as if N were 0.5, for the highest frequencies.
//
// This file is a behavioural model because the ring is a timed loop: the
// NAND delay is modelled here and the coarse and fine lines are the timed
// models dcc_cdl and dcc_fdl. The counter and the MUX are the synthesizable
// modules dcc_counter and dcc_clk_mux. Structure and modes follow the
// published design; the delay values are parameters of this model.
//
// Timing: t_DL = T_NAND + (1 + code[7:5]) * T_CDL + T_FDL_BASE
//                + code[4:0] * T_CDL / 32.
module dcc_hcdl #(
  parameter int  CODE_W     = dcc_pkg::CODE_W,
  parameter int  CNT_W      = dcc_pkg::CNT_W,
  parameter real T_NAND     = 20.0,    // ps
  parameter real T_CDL      = 120.0,   // ps per coarse stage
  parameter real T_FDL_BASE = 20.0     // ps
) (
  input  logic              en,        // from the switch: start of the delay
  input  logic              rst_n,
  input  logic [CODE_W-1:0] code,      // {D_CDL[2:0], D_FDL[4:0]}
  input  logic [CNT_W-1:0]  target,    // repeat count; 0 = count only
  input  logic              d_h,       // half-delay mode
  output logic              clk_fb,    // CLK_FB: falls after the set delay
  output logic              clk_dl,    // CLK_DL: ring output
  output logic [CNT_W-1:0]  cnt_capt   // count at the last falling edge of en
);
  localparam int FB = dcc_pkg::FDL_BITS;

  logic nand_o, cdl_o, cnt_fb;
  logic en_d, clr_line;

  // The line is reset once the enable has been low for a NAND delay, and is
  // released as soon as the enable rises, before the NAND output can fall.
  initial en_d = 1'b0;
  always @(en) en_d <= #(T_NAND) en;
  assign clr_line = ~en & ~en_d;

  initial nand_o = 1'b1;
  always @(en or clk_dl) nand_o <= #(T_NAND) ~(en & clk_dl);

  dcc_cdl #(.BITS(CODE_W - FB), .T_STAGE(T_CDL)) u_cdl (
    .in (nand_o), .code (code[CODE_W-1:FB]), .clr (clr_line), .out (cdl_o)
  );

  dcc_fdl #(.BITS(FB), .T_BASE(T_FDL_BASE), .T_UNIT(T_CDL)) u_fdl (
    .in (cdl_o), .code (code[FB-1:0]), .clr (clr_line), .out (clk_dl)
  );

  dcc_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk_dl (clk_dl), .en (en), .rst_n (rst_n), .target (target),
    .cnt_fb (cnt_fb), .cnt_capt (cnt_capt)
  );

  dcc_clk_mux u_mux (.in0 (cnt_fb), .in1 (clk_dl), .sel (d_h), .out (clk_fb));
endmodule
