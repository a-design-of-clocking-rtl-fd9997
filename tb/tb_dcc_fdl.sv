`timescale 1ps/1fs
// tb_dcc_fdl: the fine line must delay both edges by 20 ps + code * 3.75 ps
// (1/32 of one 120 ps coarse step per code), and its reset must drop an edge
// in flight and leave the output high.
module tb_dcc_fdl;
  logic in = 1'b1, out, clr = 1'b1;
  logic [4:0] code;
  int checks = 0, failures = 0;
  realtime t0, d;

  dcc_fdl dut (.in (in), .code (code), .clr (clr), .out (out));

  initial begin
    #10 clr = 1'b0;
    #1000;
    for (int c = 0; c < 32; c++) begin
      code = 5'(c);
      #500;
      for (int e = 0; e < 2; e++) begin
        in = ~in; t0 = $realtime;
        @(out);
        d = $realtime - t0;
        checks++;
        if (d < 20.0 + 3.75 * c - 0.01 || d > 20.0 + 3.75 * c + 0.01 || out !== in) begin
          failures++; $display("FAIL code %0d delay %0.3f", c, d);
        end
        #500;
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
