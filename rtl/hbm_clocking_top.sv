`timescale 1ps/1fs
// hbm_clocking_top: clock path of the HBM PHY test chip.
//
// An external differential clock, whose duty cycle may be anywhere from 20 %
// to 80 % and whose frequency may be anywhere from 50 MHz to 1.6 GHz, enters
// through the clock buffer and is corrected to 50 % duty by the
// counter-based-HCDL duty-cycle corrector. The uncorrected clock is also
// brought out (`clk_mon`) so both can be measured, as on the published test
// chip.
//
// The corrected clock runs the reduced HBM controller PHY (hbm_phy): the
// controller side exchanges four bits per pin per controller cycle at half
// the PHY clock, and the PHY sends them to the memory at double data rate on
// the row and column command pins, DQ and the write strobe, and forwards the
// clock as CK_t/CK_c. Because the PHY uses both clock edges, it is held in
// reset until the corrector reports `locked` and again during each
// retraining; this gating is this design's choice. The uncorrected clock is
// what the PHY would see without the corrector.
//
// The PLL and the delay line that aligns the clock with the commands are not
// part of this top: the clock enters directly at `clk_p`/`clk_n`.
module hbm_clocking_top (
  input  logic       clk_p,       // external differential clock
  input  logic       clk_n,
  input  logic       rst_n,       // asynchronous reset; training follows
  input  logic       train_req,   // retrain in normal operation
  output logic       dcc_out,     // duty-corrected clock
  output logic       clk_mon,     // clock before correction
  output logic       locked,      // training finished
  output logic       d_h,         // half-delay mode selected
  output logic [7:0] dcdl_code,   // trained delay code {CDL, FDL}
  output logic [5:0] ncnt_train,  // training repeat count (2*N_CNT)
  // controller side of the PHY (DFI style, 2:1 frequency ratio)
  output logic            dfi_clk,           // controller clock
  input  logic [3:0][3:0] dfi_row,           // [R0,R1,R2,R4][bit], bit 0 first
  input  logic [3:0][3:0] dfi_col,           // [C0..C3][bit]
  input  logic [3:0]      dfi_wrdata,
  input  logic            dfi_wrdata_en,
  input  logic            dfi_cke,
  input  logic            test_mode,         // CKE shows the PHY clock
  output logic [3:0]      dfi_rddata,
  output logic            dfi_rddata_valid,
  // memory side of the PHY
  output logic            ck_t,
  output logic            ck_c,
  output logic            cke,
  output logic [3:0]      row_out,
  output logic [3:0]      col_out,
  output logic            dq_out,
  output logic            dq_oe,
  output logic            wdqs_t,
  output logic            wdqs_c,
  input  logic            dq_in,
  input  logic            rdqs_t
);
  logic clk_in, clk_inb;
  logic [5:0] cnt_target;
  logic pd_up, clk_fb;

  dcc_clk_buffer u_buf (
    .clk_p (clk_p), .clk_n (clk_n), .clk_in (clk_in), .clk_inb (clk_inb),
    .clk_mon (clk_mon)
  );

  dcc_core u_dcc (
    .clk_in     (clk_in),
    .rst_n      (rst_n),
    .train_req  (train_req),
    .clk_out    (dcc_out),
    .locked     (locked),
    .d_h        (d_h),
    .code       (dcdl_code),
    .ncnt_train (ncnt_train),
    .cnt_target (cnt_target),
    .pd_up      (pd_up),
    .clk_fb     (clk_fb)
  );

  logic phy_rst_n;
  assign phy_rst_n = rst_n & locked;

  hbm_phy u_phy (
    .clk (dcc_out), .rst_n (phy_rst_n), .dfi_clk (dfi_clk),
    .dfi_row (dfi_row), .dfi_col (dfi_col), .dfi_wrdata (dfi_wrdata),
    .dfi_wrdata_en (dfi_wrdata_en), .dfi_cke (dfi_cke), .test_mode (test_mode),
    .dfi_rddata (dfi_rddata),
    .dfi_rddata_valid (dfi_rddata_valid), .ck_t (ck_t), .ck_c (ck_c), .cke (cke),
    .row_out (row_out), .col_out (col_out), .dq_out (dq_out), .dq_oe (dq_oe),
    .wdqs_t (wdqs_t), .wdqs_c (wdqs_c), .dq_in (dq_in), .rdqs_t (rdqs_t)
  );
endmodule
