`timescale 1ps/1fs
// tb_dcc_counter: drives CLK_DL with a chosen number of rising edges while
// the enable is high and checks CLK_FB against the target, the count
// capture at the enable's falling edge, target 0 (count only) and the
// clearing by a low enable.
module tb_dcc_counter;
  logic clk_dl = 1'b1, en = 1'b0, rst_n = 1'b1, cnt_fb;
  logic [5:0] target, cnt_capt;
  int checks = 0, failures = 0;

  dcc_counter dut (.clk_dl (clk_dl), .en (en), .rst_n (rst_n), .target (target),
                   .cnt_fb (cnt_fb), .cnt_capt (cnt_capt));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic burst(int edges, int tgt);
    int fell_at;
    target = 6'(tgt);
    fell_at = -1;
    #50 en = 1'b1;
    #10;
    chk(cnt_fb === 1'b1, "CLK_FB high at start");
    for (int k = 1; k <= edges; k++) begin
      #50 clk_dl = 1'b0;
      #50 clk_dl = 1'b1;
      #1;
      if (cnt_fb === 1'b0 && fell_at < 0) fell_at = k;
    end
    if (tgt == 0 || tgt > edges) chk(fell_at == -1, $sformatf("no fall expected (edges %0d, target %0d)", edges, tgt));
    else chk(fell_at == tgt, $sformatf("fall at edge %0d expected %0d", fell_at, tgt));
    #50 en = 1'b0;
    #10;
    chk(cnt_capt == 6'((edges > 63) ? 63 : edges), $sformatf("captured %0d expected %0d", cnt_capt, edges));
    chk(cnt_fb === 1'b1, "CLK_FB released by low enable");
    // Edges while disabled are not counted.
    #50 clk_dl = 1'b0; #50 clk_dl = 1'b1;
  endtask

  initial begin
    target = '0;
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    burst(3, 0);  burst(10, 0);  burst(70, 0);
    burst(4, 4);  burst(1, 1);   burst(8, 2);   burst(3, 5);  burst(16, 16);
    repeat (20) burst($urandom_range(0, 33), $urandom_range(0, 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
