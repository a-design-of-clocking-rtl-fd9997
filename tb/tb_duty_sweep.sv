`timescale 1ps/1fs
// tb_duty_sweep: the duty-cycle and frequency sweeps of the corrector, run on
// the full design at its default size.
//
//   - input duty 20 % to 80 % in steps of 10 % at 50 MHz and at 1.6 GHz;
//   - input duty 20 % and 80 % at every 100 MHz from 100 MHz to 1.6 GHz.
//
// Each case starts with a reset, so the corrector trains from scratch. The
// bench checks that it locks after exactly 34 input cycles, and that the
// corrected output then has the input period and a duty cycle within 1 % of
// 50 %. It prints the output duty error of every case and the worst error of
// each sweep. The bench drives the PHY inputs to idle and does not use them.
module tb_duty_sweep;
  logic clk_p = 1'b0, clk_n = 1'b1, rst_n = 1'b1, train_req = 1'b0;
  logic dcc_out, clk_mon, locked, d_h;
  logic [7:0] dcdl_code;
  logic [5:0] ncnt_train;
  logic dfi_clk, dfi_rddata_valid, dfi_wrdata_en = 1'b0, dfi_cke = 1'b0, test_mode = 1'b0;
  logic [3:0][3:0] dfi_row = '1, dfi_col = '1;
  logic [3:0] dfi_wrdata = '0, dfi_rddata;
  logic ck_t, ck_c, cke, dq_out, dq_oe, wdqs_t, wdqs_c, dq_in = 1'b0, rdqs_t = 1'b0;
  logic [3:0] row_out, col_out;
  int checks = 0, failures = 0, cases = 0;
  realtime per = 10000.0, duty = 0.5;
  bit run_clk = 1'b0;

  hbm_clocking_top dut (.*);

  initial begin
    forever begin
      if (run_clk) begin
        clk_p = 1'b1; clk_n = 1'b0; #(per * duty);
        clk_p = 1'b0; clk_n = 1'b1; #(per * (1.0 - duty));
      end else #100;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (T=%0.1f ps duty=%0.2f)", what, per, duty);
    end
  endtask

  // trains at period t and input duty d; returns the worst output duty error
  task automatic one_case(input real t, input real d, output real worst);
    int n;
    real tr, tf, tr2, h;
    per = t; duty = d;
    rst_n = 1'b0; run_clk = 1'b1;
    repeat (3) @(posedge clk_mon);
    #(per * 0.3);
    rst_n = 1'b1;
    n = 0;
    do begin
      @(posedge clk_mon); n++; #1;
    end while (!locked && n < 60);
    chk(n == 34, $sformatf("lock after %0d cycles", n));
    repeat (3) @(posedge dcc_out);
    worst = 0.0;
    repeat (4) begin
      @(posedge dcc_out); tr = $realtime;
      @(negedge dcc_out); tf = $realtime;
      @(posedge dcc_out); tr2 = $realtime;
      h = (tf - tr) / per;
      if (h - 0.5 > worst) worst = h - 0.5;
      if (0.5 - h > worst) worst = 0.5 - h;
      chk(tr2 - tr > t - 1.0 && tr2 - tr < t + 1.0, "output period");
    end
    chk(worst <= 0.01, $sformatf("output duty error %0.3f %%", worst * 100.0));
    cases++;
  endtask

  initial begin
    real w, worst_lo, worst_hi, worst_f;
    #1;
    worst_lo = 0.0; worst_hi = 0.0;
    for (int dp = 20; dp <= 80; dp += 10) begin
      one_case(20000.0, dp / 100.0, w);
      if (w > worst_lo) worst_lo = w;
      $display("50 MHz   in %0d %%: out error %0.3f %%  (C=%0d D_H=%0d code=%0d)", dp, w * 100.0, ncnt_train, d_h, dcdl_code);
      one_case(625.0, dp / 100.0, w);
      if (w > worst_hi) worst_hi = w;
      $display("1600 MHz in %0d %%: out error %0.3f %%  (C=%0d D_H=%0d code=%0d)", dp, w * 100.0, ncnt_train, d_h, dcdl_code);
    end
    worst_f = 0.0;
    for (int f = 100; f <= 1600; f += 100) begin
      for (int k = 0; k < 2; k++) begin
        one_case(1.0e6 / f, k ? 0.8 : 0.2, w);
        if (w > worst_f) worst_f = w;
        $display("%4d MHz in %0d %%: out error %0.3f %%  (C=%0d D_H=%0d)", f, k ? 80 : 20, w * 100.0, ncnt_train, d_h);
      end
    end
    $display("worst output duty error: 50 MHz %0.3f %%, 1.6 GHz %0.3f %%, 100 MHz steps %0.3f %%",
             worst_lo * 100.0, worst_hi * 100.0, worst_f * 100.0);
    chk(cases == 46, "all cases run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
