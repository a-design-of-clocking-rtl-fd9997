`timescale 1ps/1fs
// tb_dcc_clk_mux: exhaustive check of the 2:1 clock multiplexer.
module tb_dcc_clk_mux;
  logic in0, in1, sel, out;
  int checks = 0, failures = 0;

  dcc_clk_mux dut (.in0 (in0), .in1 (in1), .sel (sel), .out (out));

  initial begin
    for (int r = 0; r < 4; r++)
      for (int v = 0; v < 8; v++) begin
        {sel, in1, in0} = 3'(v);
        #10;
        checks++;
        if (out !== (v[2] ? v[1] : v[0])) begin
          failures++; $display("FAIL sel=%b in1=%b in0=%b out=%b", sel, in1, in0, out);
        end
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
