`timescale 1ps/1fs
// hbm_phy: reduced HBM controller PHY, the part of one channel needed for
// ACTIVATE, WRITE, READ and PRECHARGE.
//
// The controller side runs at half the PHY clock (2:1 frequency ratio) and
// gives four bits per pin per controller cycle. The PHY sends them out at
// double data rate on the memory side:
//   - four row command pins R0, R1, R2 and R4 (the row pins the four commands
//     need), `dfi_row[p]` drives `row_out[p]` in that order;
//   - four column command pins C0 to C3, `dfi_col[p]` drives `col_out[p]`;
//   - one data pin DQ for writes, with its output enable, and one write
//     strobe WDQS that toggles once per bit while write data is sent;
//   - the memory clock CK_t/CK_c, which is the PHY clock itself.
// Every output goes through its own 4:1 serializer (hbm_ser4), so all pins
// keep the same latency: bit 0 of a word leaves in the high half of the second
// PHY cycle after the word is taken, and the other bits follow in the next
// three half cycles. Read data comes back on DQ with a read strobe RDQS and is
// collected four bits at a time by hbm_des4 (burst length 4).
//
// Test mode: CKE normally carries the controller's clock-enable bit,
// registered once at the rising edge of the controller clock. With
// `test_mode` high it carries the PHY clock instead, so the internal clock
// can be observed at a low-speed pin.
//
// Interface and timing: `dfi_clk` is the controller clock (the PHY clock
// divided by two); every input word is taken at its rising edge. With
// `dfi_wrdata_en` high, `dfi_wrdata` is sent on DQ together with the strobe
// and DQ's output enable in the same beats. `dfi_rddata_valid` marks one
// `dfi_clk` cycle per received read burst.
//
// The pin selection, the 2:1 ratio, the four-bit words, the one DQ and one
// strobe block, and the clock on CKE in test mode follow the published PHY.
// The single CK pair taken directly from the PHY clock, the strobe pattern
// (edge aligned with the data), the burst length, the shared latency and the
// registered CKE are this design's choices; command encoding is left to the
// controller.
module hbm_phy (
  input  logic            clk,               // PHY clock, duty corrected
  input  logic            rst_n,             // asynchronous reset, active low
  output logic            dfi_clk,           // controller clock, clk / 2
  input  logic [3:0][3:0] dfi_row,           // [pin R0,R1,R2,R4][bit]
  input  logic [3:0][3:0] dfi_col,           // [pin C0..C3][bit]
  input  logic [3:0]      dfi_wrdata,        // DQ write bits
  input  logic            dfi_wrdata_en,     // send write data and strobe
  input  logic            dfi_cke,           // clock enable for the memory
  input  logic            test_mode,         // CKE shows the PHY clock
  output logic [3:0]      dfi_rddata,        // DQ read bits
  output logic            dfi_rddata_valid,
  output logic            ck_t,              // memory clock
  output logic            ck_c,
  output logic            cke,
  output logic [3:0]      row_out,           // R0, R1, R2, R4
  output logic [3:0]      col_out,           // C0..C3
  output logic            dq_out,            // DQ driven by the PHY
  output logic            dq_oe,             // DQ output enable
  output logic            wdqs_t,            // write strobe
  output logic            wdqs_c,
  input  logic            dq_in,             // DQ from the memory
  input  logic            rdqs_t             // read strobe from the memory
);
  logic [10:0] div_clk;   // each serializer's clk / 2; all equal after reset

  for (genvar p = 0; p < 4; p++) begin : g_cmd
    hbm_ser4 u_row (.clk(clk), .rst_n(rst_n), .din(dfi_row[p]), .dfi_clk(div_clk[p]),     .dout(row_out[p]));
    hbm_ser4 u_col (.clk(clk), .rst_n(rst_n), .din(dfi_col[p]), .dfi_clk(div_clk[4 + p]), .dout(col_out[p]));
  end

  hbm_ser4 u_dq   (.clk(clk), .rst_n(rst_n), .din(dfi_wrdata),             .dfi_clk(div_clk[8]),  .dout(dq_out));
  hbm_ser4 u_oe   (.clk(clk), .rst_n(rst_n), .din({4{dfi_wrdata_en}}),     .dfi_clk(div_clk[9]),  .dout(dq_oe));
  hbm_ser4 u_wdqs (.clk(clk), .rst_n(rst_n), .din({2{1'b0, dfi_wrdata_en}}), .dfi_clk(div_clk[10]), .dout(wdqs_t));

  hbm_des4 u_rd (
    .dqs (rdqs_t), .dq (dq_in), .dfi_clk (dfi_clk), .rst_n (rst_n),
    .rd_data (dfi_rddata), .rd_valid (dfi_rddata_valid)
  );

  logic cke_q;
  always_ff @(posedge dfi_clk or negedge rst_n) begin
    if (!rst_n) cke_q <= 1'b0;
    else        cke_q <= dfi_cke;
  end

  assign cke     = test_mode ? clk : cke_q;
  assign dfi_clk = div_clk[0];
  assign wdqs_c  = ~wdqs_t;
  assign ck_t    = clk;
  assign ck_c    = ~clk;
endmodule
