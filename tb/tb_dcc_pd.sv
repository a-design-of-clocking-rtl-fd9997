`timescale 1ps/1fs
// tb_dcc_pd: the phase detector must give UP when CLK_FB falls before the
// falling edge of CLK_FSM and DN when it falls after.
module tb_dcc_pd;
  logic clk_ref = 1'b0, clk_fb = 1'b1, rst_n = 1'b1, up, dn;
  int checks = 0, failures = 0;

  dcc_pd dut (.clk_ref (clk_ref), .clk_fb (clk_fb), .rst_n (rst_n), .up (up), .dn (dn));

  task automatic trial(int fb_fall);   // fb fall time after ref rise, ps
    fork
      begin clk_ref = 1'b1; #1000; clk_ref = 1'b0; end
      begin #(fb_fall); clk_fb = 1'b0; end
    join
    #5;
    checks++;
    if (up !== (fb_fall < 1000) || dn !== ~up) begin
      failures++; $display("FAIL fb_fall=%0d up=%b dn=%b", fb_fall, up, dn);
    end
    #2000 clk_fb = 1'b1;
    #2000;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #100;
    checks++;
    if (up !== 1'b0) begin failures++; $display("FAIL reset"); end
    repeat (40) trial($urandom_range(100, 1900));
    trial(990); trial(1010);
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
