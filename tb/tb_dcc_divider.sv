`timescale 1ps/1fs
// tb_dcc_divider: checks that the divider toggles on each enabled rising edge,
// returns low on a disabled edge, and that a pulse lasts one input period
// even with a 20 % input duty cycle.
module tb_dcc_divider;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clk_div;
  int checks = 0, failures = 0;
  logic model;
  realtime t_rise;
  bit seen_rise = 1'b0;

  dcc_divider dut (.clk (clk), .rst_n (rst_n), .en (en), .clk_div (clk_div));

  always begin clk = 1'b1; #200; clk = 1'b0; #800; end

  always @(posedge clk_div) begin t_rise = $realtime; seen_rise = 1'b1; end
  always @(negedge clk_div) if (seen_rise) begin
    checks++;
    if ($realtime - t_rise != 1000.0) begin
      failures++; $display("FAIL pulse width %0.1f", $realtime - t_rise);
    end
  end

  initial begin
    model = 1'b0;
    #500 rst_n = 1'b1;
    repeat (200) begin
      @(negedge clk) en = 1'($urandom_range(0, 1));
      @(posedge clk) model = en ? ~model : 1'b0;
      #1;
      checks++;
      if (clk_div !== model) begin failures++; $display("FAIL clk_div=%b exp %b", clk_div, model); end
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
