`timescale 1ps/1fs
// tb_dcc_bin2therm: exhaustive check of the 3-bit and 5-bit thermometer
// converters used by the coarse and fine delay lines.
module tb_dcc_bin2therm;
  logic [2:0] b3;  logic [6:0]  t3;
  logic [4:0] b5;  logic [30:0] t5;
  int checks = 0, failures = 0;

  dcc_bin2therm #(.N(3)) dut3 (.bin (b3), .therm (t3));
  dcc_bin2therm #(.N(5)) dut5 (.bin (b5), .therm (t5));

  initial begin
    for (int v = 0; v < 8; v++) begin
      b3 = 3'(v); #1;
      checks++;
      if (t3 !== 7'((1 << v) - 1)) begin failures++; $display("FAIL 3-bit %0d -> %b", v, t3); end
    end
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v); #1;
      checks++;
      if (t5 !== 31'((64'd1 << v) - 1)) begin failures++; $display("FAIL 5-bit %0d -> %b", v, t5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
