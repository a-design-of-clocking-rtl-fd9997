`timescale 1ps/1fs
// tb_dcc_edge_combiner: CLK_R has a distorted duty cycle, CLK_F falls at a
// chosen time in each period. The output must rise 20 ps after each rising
// edge of CLK_R and fall 20 ps after each falling edge of CLK_F, so its high
// time equals the CLK_R-to-CLK_F spacing whatever the CLK_R duty.
module tb_dcc_edge_combiner;
  logic clk_r = 1'b0, clk_f = 1'b1, out;
  int checks = 0, failures = 0;
  realtime tr, tf;

  dcc_edge_combiner dut (.clk_r (clk_r), .clk_f (clk_f), .out (out));

  task automatic period(int t, int hi_r, int f_at);
    fork
      begin clk_r = 1'b1; #(hi_r); clk_r = 1'b0; #(t - hi_r); end
      begin #(f_at); clk_f = 1'b0; #(t - f_at - 50); clk_f = 1'b1; end
      begin
        @(posedge out); tr = $realtime;
        @(negedge out); tf = $realtime;
      end
    join
  endtask

  initial begin
    #1000;
    repeat (30) begin
      int t, hi_r, f_at;
      t    = $urandom_range(600, 20000);
      hi_r = t * $urandom_range(20, 80) / 100;
      f_at = t / 2;
      period(t, hi_r, f_at);
      checks++;
      if (tf - tr != real'(f_at)) begin
        failures++; $display("FAIL T=%0d high time %0.1f expected %0d", t, tf - tr, f_at);
      end
    end
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
