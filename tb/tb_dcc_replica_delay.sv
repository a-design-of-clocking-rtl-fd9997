`timescale 1ps/1fs
// tb_dcc_replica_delay: edges must arrive T_REP later, also for a second
// instance with another delay.
module tb_dcc_replica_delay;
  logic in = 1'b0, out_a, out_b;
  int checks = 0, failures = 0;
  realtime t0;
  bit armed = 1'b0;

  dcc_replica_delay                  dut_a (.in (in), .out (out_a));
  dcc_replica_delay #(.T_REP(75.5))  dut_b (.in (in), .out (out_b));

  always @(out_a) if (armed) begin
    checks++;
    if ($realtime - t0 != 40.0 || out_a !== in) begin failures++; $display("FAIL default delay"); end
  end
  always @(out_b) if (armed) begin
    checks++;
    if ($realtime - t0 != 75.5 || out_b !== in) begin failures++; $display("FAIL 75.5 ps delay"); end
  end

  initial begin
    #1000;
    armed = 1'b1;
    repeat (20) begin
      in = ~in; t0 = $realtime;
      #($urandom_range(100, 900));
    end
    #1000;
    if (checks != 40) begin failures++; $display("FAIL %0d edges seen", checks); end
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
