`timescale 1ps/1fs
// tb_dcc_cdl: the coarse line must delay both edges by (1 + code) * 120 ps,
// and its reset must drop an edge in flight and leave the output high.
module tb_dcc_cdl;
  logic in = 1'b1, out, clr = 1'b1;
  logic [2:0] code;
  int checks = 0, failures = 0;
  realtime t0;

  dcc_cdl dut (.in (in), .code (code), .clr (clr), .out (out));

  initial begin
    #10 clr = 1'b0;
    #2000;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 8; c++) begin
        code = 3'(c);
        #2000;
        for (int e = 0; e < 2; e++) begin
          in = ~in; t0 = $realtime;
          @(out);
          checks++;
          if ($realtime - t0 != 120.0 * (1 + c) || out !== in) begin
            failures++; $display("FAIL code %0d delay %0.2f", c, $realtime - t0);
          end
          #1500;
        end
      end
    // line reset: an edge still in the line when clr rises is dropped, the
    // output rests high, and edges pass normally again after release
    repeat (10) begin
      code = '1;
      #2000;
      in = 1'b0;
      #($urandom_range(10, 100));
      clr = 1'b1;
      #1;
      checks++;
      if (out !== 1'b1) begin failures++; $display("FAIL output not at rest under reset"); end
      #3000;
      checks++;
      if (out !== 1'b1) begin failures++; $display("FAIL edge leaked through the reset"); end
      in = 1'b1;
      #100 clr = 1'b0;
      #100 in = 1'b0;
      t0 = $realtime;
      @(out);
      checks++;
      if (out !== 1'b0 || $realtime - t0 > 2000.0) begin failures++; $display("FAIL no edge after release"); end
      #2000 in = 1'b1;
      #2000;
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
