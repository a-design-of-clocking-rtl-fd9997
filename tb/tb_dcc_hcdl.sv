`timescale 1ps/1fs
// tb_dcc_hcdl: the counter-based half-cycle delay line.
//  * count mode: CLK_FB falls 2*N*t_DL(code) after the enable rises;
//  * half-delay mode: CLK_FB falls t_DL(code) after the enable rises;
//  * count-only (target 0): no fall, and the captured count equals the
//    number of ring periods 2*t_DL that fit in the enable window;
//  * back to back: a short enable with a long line, then after a short gap a
//    new measurement, which must not see edges left over from the first;
// with t_DL(code) = 20 + (1 + code[7:5]) * 120 + 20 + code[4:0] * 3.75 ps.
module tb_dcc_hcdl;
  logic en = 1'b0, rst_n = 1'b1, d_h = 1'b0, clk_fb, clk_dl;
  logic [7:0] code;
  logic [5:0] target, cnt_capt;
  int checks = 0, failures = 0;
  realtime t0, tf;

  dcc_hcdl dut (.en (en), .rst_n (rst_n), .code (code), .target (target), .d_h (d_h),
                .clk_fb (clk_fb), .clk_dl (clk_dl), .cnt_capt (cnt_capt));

  function automatic real t_dl(int c);
    return 20.0 + 120.0 * (1 + (c >> 5)) + 20.0 + 120.0 * (c & 31) / 32.0;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic delay_case(int c, int n, bit half);
    real exp_d;
    code = 8'(c); target = 6'(n); d_h = half;
    #3000;
    en = 1'b1; t0 = $realtime;
    @(negedge clk_fb); tf = $realtime;
    exp_d = half ? t_dl(c) : 2.0 * n * t_dl(c);
    chk((tf - t0 > exp_d - 0.01) && (tf - t0 < exp_d + 0.01),
        $sformatf("code %0d N=%0d D_H=%0d delay %0.2f expected %0.2f", c, n, half, tf - t0, exp_d));
    #100 en = 1'b0;
    #3000;
    chk(clk_fb === 1'b1 && clk_dl === 1'b1, "line idle after enable low");
  endtask

  task automatic count_case(int c, int w);
    int exp_n;
    code = 8'(c); target = '0; d_h = 1'b0;
    #3000;
    en = 1'b1;
    #(w);
    chk(clk_fb === 1'b1, "no CLK_FB fall in count-only mode");
    en = 1'b0;
    #10;
    exp_n = 0;
    while (2.0 * (exp_n + 1) * t_dl(c) < real'(w)) exp_n++;
    chk(cnt_capt == 6'(exp_n), $sformatf("count %0d expected %0d (code %0d window %0d)", cnt_capt, exp_n, c, w));
  endtask

  task automatic back_to_back(int c1, int w, int gap, int c2, int n);
    real exp_d;
    code = 8'(c1); target = '0; d_h = 1'b0;
    #3000;
    en = 1'b1;
    #(w) en = 1'b0;
    code = 8'(c2); target = 6'(n);
    #(gap) en = 1'b1; t0 = $realtime;
    @(negedge clk_fb); tf = $realtime;
    exp_d = 2.0 * n * t_dl(c2);
    chk((tf - t0 > exp_d - 0.01) && (tf - t0 < exp_d + 0.01),
        $sformatf("back to back: delay %0.2f expected %0.2f (gap %0d)", tf - t0, exp_d, gap));
    #100 en = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    delay_case(255, 1, 1'b0);
    delay_case(0, 1, 1'b1);
    delay_case(224, 5, 1'b0);
    delay_case(36, 1, 1'b1);
    delay_case(100, 16, 1'b0);
    repeat (20) delay_case($urandom_range(0, 255), $urandom_range(1, 16), 1'($urandom_range(0, 1)));
    count_case(255, 20000);
    count_case(255, 625);
    count_case(0, 10001);
    back_to_back(255, 1000, 1000, 127, 1);
    repeat (10) back_to_back(255, $urandom_range(300, 1100), $urandom_range(300, 1100), $urandom_range(0, 127), 1);
    repeat (10) count_case($urandom_range(0, 255), $urandom_range(500, 20000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
