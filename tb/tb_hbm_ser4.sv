`timescale 1ps/1fs
// tb_hbm_ser4: drives random four-bit words into the serializer, one per
// divided-clock cycle, and samples the serial output in the middle of every
// half cycle. Each word must appear bit 0 first, one bit per half cycle,
// starting in the high half of the second clock cycle after the word was
// taken (the rising edge of dfi_clk), with no gap between words. Also checks
// that dfi_clk is the clock divided by two.
module tb_hbm_ser4;
  localparam realtime T = 1000.0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0] din = '0;
  logic dfi_clk, dout;
  int checks = 0, failures = 0, words = 0;

  hbm_ser4 dut (.clk (clk), .rst_n (rst_n), .din (din), .dfi_clk (dfi_clk), .dout (dout));

  always begin #(T/2) clk = ~clk; end

  // expected bits of a word taken at the current edge
  task automatic expect_word(input logic [3:0] w);
    for (int k = 0; k < 4; k++) begin
      if (k % 2 == 0) @(posedge clk); else @(negedge clk);
      #(T/4);
      checks++;
      if (dout !== w[k]) begin
        failures++; $display("FAIL word %h bit %0d: dout=%b", w, k, dout);
      end
    end
  endtask

  realtime t_last = 0.0;
  always @(posedge dfi_clk) if (rst_n && t_last > 0.0) begin
    checks++;
    if ($realtime - t_last != 2.0 * T) begin failures++; $display("FAIL dfi_clk period %0.1f", $realtime - t_last); end
    t_last = $realtime;
  end else t_last = $realtime;

  initial begin
    #1 rst_n = 1'b0;
    #(2*T) rst_n = 1'b1;
    repeat (300) begin
      @(posedge clk); #1;
      if (dfi_clk) begin                   // this edge took `din`
        fork expect_word(din); join_none
        words++;
        #1 din = 4'($urandom);   // after the check has read the old word
      end
    end
    #(3*T);
    checks++;
    if (words != 150) begin failures++; $display("FAIL %0d words taken, expected 150", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000*T);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
