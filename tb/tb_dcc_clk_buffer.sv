`timescale 1ps/1fs
// tb_dcc_clk_buffer: a differential clock with a distorted duty cycle must
// come out 50 ps later with the same duty cycle on CLK_IN and the monitor
// output, and inverted on CLK_INB.
module tb_dcc_clk_buffer;
  logic clk_p = 1'b0, clk_n = 1'b1, clk_in, clk_inb, clk_mon;
  int checks = 0, failures = 0;
  realtime t_edge;

  dcc_clk_buffer dut (.clk_p (clk_p), .clk_n (clk_n), .clk_in (clk_in),
                      .clk_inb (clk_inb), .clk_mon (clk_mon));

  always @(clk_in) begin
    #1;
    checks++;
    if ($realtime - 1.0 - t_edge != 50.0 || clk_in !== clk_p || clk_inb !== ~clk_p ||
        clk_mon !== clk_p) begin
      failures++; $display("FAIL at %0t", $realtime);
    end
  end

  initial begin
    #1000;
    repeat (20) begin
      int t, hi;
      t  = $urandom_range(625, 20000);
      hi = t * $urandom_range(20, 80) / 100;
      clk_p = 1'b1; clk_n = 1'b0; t_edge = $realtime; #(hi);
      clk_p = 1'b0; clk_n = 1'b1; t_edge = $realtime; #(t - hi);
    end
    #500;
    if (checks != 40) begin failures++; $display("FAIL %0d edges", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
