`timescale 1ps/1fs
// tb_dcc_fsm: the training FSM against an abstract loop.
//
// The bench plays the HCDL and the phase detector: it reports a fixed edge
// count E for the repeat-count window and, at each falling edge of CLK_FSM,
// UP when the code under test is below a hidden threshold X (loop too short).
// The FSM must end on code X (255 if none is long enough), derive C, D_H and
// the normal target from E, raise `locked` after exactly 34 input cycles,
// pulse CLK_FSM exactly 9 times (e0, e2, e6, ..., e30) for one period each,
// and retrain on `train_req`. The input clock has a 30 % duty cycle.
module tb_dcc_fsm;
  logic clk = 1'b0, rst_n = 1'b1, train_req = 1'b0, pd_up = 1'b0;
  logic clk_fsm, d_tr, d_h, locked;
  logic [7:0] code;
  logic [5:0] cnt_capt = '0, cnt_target, ncnt_train;
  dcc_pkg::dcc_state_e state;
  int checks = 0, failures = 0;
  int thr = 0, edge_no = 0, pulses = 0, bad_pulse = 0;
  realtime t_rise;

  dcc_fsm dut (
    .clk (clk), .rst_n (rst_n), .train_req (train_req), .cnt_capt (cnt_capt),
    .pd_up (pd_up), .clk_fsm (clk_fsm), .d_tr (d_tr), .d_h (d_h), .locked (locked),
    .code (code), .cnt_target (cnt_target), .ncnt_train (ncnt_train), .state (state)
  );

  always begin clk = 1'b0; #700; clk = 1'b1; #300; end

  always @(posedge clk_fsm) begin
    t_rise = $realtime;
    pulses++;
    if (!(edge_no == 0 || (edge_no >= 2 && (edge_no - 2) % 4 == 0))) bad_pulse++;
  end
  always @(negedge clk_fsm) begin
    if ($realtime - t_rise != 1000.0) bad_pulse++;
    pd_up = (int'(code) < thr);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic train(int e, int x, bit by_req);
    int n, c;
    cnt_capt = 6'(e); thr = x; pulses = 0; bad_pulse = 0;
    if (by_req) begin
      @(negedge clk) train_req = 1'b1;
      @(posedge clk); #1 train_req = 1'b0;
    end else begin
      rst_n = 1'b0; #150; rst_n = 1'b1;
    end
    n = 0; edge_no = 0;
    do begin
      @(posedge clk); n++; #1; edge_no = n;
      if (n < 34) chk(d_tr && !locked, "training flags during training");
    end while (!locked && n < 50);
    chk(n == 34, $sformatf("locked after %0d cycles", n));
    c = e + 1;
    if (c > 32) c = 32;
    if (c % 2 == 1 && c != 1) c++;
    chk(ncnt_train == 6'(c), $sformatf("C=%0d expected %0d (E=%0d)", ncnt_train, c, e));
    chk(d_h == (c == 1), "half-delay mode");
    chk(cnt_target == ((c == 1) ? 6'd1 : 6'(c / 2)), "normal target");
    chk(int'(code) == ((x > 255) ? 255 : x), $sformatf("code %0d expected %0d", code, x));
    chk(pulses == 9 && bad_pulse == 0, $sformatf("CLK_FSM pulses %0d, misplaced %0d", pulses, bad_pulse));
    chk(!d_tr, "switch in normal position");
    repeat (5) @(posedge clk);
    #1 chk(locked && clk_fsm == 1'b0 && int'(code) == ((x > 255) ? 255 : x), "state held in normal operation");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #100;
    train(8, 224, 1'b0);
    train(0, 36, 1'b0);
    train(2, 123, 1'b1);
    train(1, 0, 1'b0);
    train(40, 256, 1'b1);
    train(5, 255, 1'b0);
    repeat (12) train($urandom_range(0, 40), $urandom_range(0, 256), 1'($urandom_range(0, 1)));
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
