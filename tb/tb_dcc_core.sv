`timescale 1ps/1fs
// tb_dcc_core: self-checking test of the duty-cycle corrector.
//
// For a grid of input periods (50 MHz .. 1.6 GHz) and input duty cycles
// (20 %, 50 %, 80 %) the bench resets the corrector and checks that
//  * training ends exactly 34 input cycles after reset release;
//  * the training count C and the half-delay choice equal the values worked
//    out here from the delay-line timing (count of ring periods 2*t_DL,max
//    in one period, plus one, odd values above 1 raised to even);
//  * the trained code is within one step of the smallest code whose training
//    loop T_REP + 2*C*t_DL(code) reaches one period;
//  * the output duty cycle, measured over 8 periods, is within 1 % of 50 %.
module tb_dcc_core;
  localparam real T_EC = 20.0, T_NAND = 20.0, T_CDL = 120.0, T_FB = 20.0;
  localparam real T_REP = 2.0 * T_EC;

  logic clk_in = 1'b0, rst_n = 1'b1, train_req = 1'b0;
  logic clk_out, locked, d_h, pd_up, clk_fb;
  logic [7:0] code;
  logic [5:0] ncnt_train, cnt_target;
  int checks = 0, failures = 0;
  realtime per = 10000.0, duty = 0.5;
  bit run_clk = 1'b0;

  dcc_core dut (
    .clk_in (clk_in), .rst_n (rst_n), .train_req (train_req), .clk_out (clk_out),
    .locked (locked), .d_h (d_h), .code (code), .ncnt_train (ncnt_train),
    .cnt_target (cnt_target), .pd_up (pd_up), .clk_fb (clk_fb)
  );

  initial begin
    forever begin
      if (run_clk) begin
        clk_in = 1'b1; #(per * duty);
        clk_in = 1'b0; #(per * (1.0 - duty));
      end else #100;
    end
  end

  function automatic real t_dl(int c);
    return T_NAND + T_CDL * (1 + (c >> 5)) + T_FB + T_CDL * (c & 31) / 32.0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (T=%0.1f ps duty=%0.2f)", what, per, duty);
    end
  endtask

  task automatic run_case(real t, real d);
    int n, edges, c, exp_code;
    real tr, tf, hi, worst;
    per = t; duty = d;
    rst_n = 1'b0; run_clk = 1'b1;
    repeat (3) @(posedge clk_in);
    #(per * 0.3);
    rst_n = 1'b1;
    n = 0;
    do begin
      @(posedge clk_in); n++; #1;
    end while (!locked && n < 60);
    check(n == 34, $sformatf("training took %0d cycles, expected 34", n));
    // Independent expectation of the training count.
    edges = 0;
    while (2.0 * (edges + 1) * t_dl(255) <= t) edges++;
    c = edges + 1;
    if (c > 32) c = 32;
    if (c % 2 == 1 && c != 1) c++;
    check(ncnt_train == 6'(c), $sformatf("C=%0d expected %0d", ncnt_train, c));
    check(d_h == (c == 1), "half-delay mode choice");
    check(cnt_target == ((c == 1) ? 6'd1 : 6'(c / 2)), "normal counter target");
    exp_code = 255;
    for (int k = 255; k >= 0; k--) if (T_REP + 2.0 * c * t_dl(k) >= t) exp_code = k;
    check((int'(code) >= exp_code - 1) && (int'(code) <= exp_code + 1),
          $sformatf("code %0d expected %0d", code, exp_code));
    repeat (3) @(posedge clk_in);
    worst = 0.0;
    repeat (8) begin
      @(posedge clk_out); tr = $realtime;
      @(negedge clk_out); tf = $realtime;
      hi = (tf - tr) / t;
      if ((hi - 0.5 > worst) || (0.5 - hi > worst)) worst = (hi > 0.5) ? hi - 0.5 : 0.5 - hi;
    end
    check(worst <= 0.01, $sformatf("duty error %0.3f %%", worst * 100.0));
    $display("T=%7.1f ps in-duty=%0.2f  C=%0d D_H=%0d code=%0d (exp %0d)  worst duty err=%0.3f %%",
             t, d, ncnt_train, d_h, code, exp_code, worst * 100.0);
    run_clk = 1'b0;
    #1000;
  endtask

  initial begin
    real periods[7] = '{20000.0, 10000.0, 5000.0, 3333.0, 2500.0, 1250.0, 625.0};
    real duties[3]  = '{0.2, 0.5, 0.8};
    foreach (periods[i]) foreach (duties[j]) run_case(periods[i], duties[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(50_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
