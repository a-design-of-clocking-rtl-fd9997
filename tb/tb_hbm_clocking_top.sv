`timescale 1ps/1fs
// tb_hbm_clocking_top: end-to-end test of the clock path at full size.
//
// A differential clock with a distorted duty cycle (20 % or 80 %) is applied
// at frequencies from 50 MHz to 1.6 GHz. For each case the corrector is
// trained, by reset or by a training request after a frequency change, and
// the bench checks: lock exactly 34 input cycles after training starts; the
// monitor output still carries the distorted duty; the corrected output is
// within 1 % of 50 % duty and has the input period. It also counts how often
// each mechanism of the design occurred and fails if one never did:
// repeat-count training with an odd count raised to even, counter mode,
// half-delay mode, UP and DN decisions of the binary search, and retraining
// on request.
//
// At 50 MHz, 1.6 GHz and 800 MHz the bench then acts as the memory controller
// and sends ACTIVATE, WRITE with one four-bit word of data, READ and
// PRECHARGE through the PHY, which now runs on the corrected clock. A memory
// model decodes the command pins in the middle of each half cycle of CK_t,
// stores the write data it samples on DQ while the write strobe toggles, and
// answers the read with a centred read strobe. The bench checks that every
// command arrives once, that the stored word is the one written and that the
// read returns it to the controller side. The command encodings used on R0,
// R1, R2 and C0..C2 are those of HBM2 memories; the PHY itself does not
// interpret them. Finally the bench switches the PHY to test mode and checks
// that CKE then carries the corrected clock.
//
// Twice the input clock is stopped for 40 periods and restarted at the same
// frequency, as in a power-down: the corrector must stay locked and give a
// corrected output at once from its stored result.
module tb_hbm_clocking_top;
  logic clk_p = 1'b0, clk_n = 1'b1, rst_n = 1'b1, train_req = 1'b0;
  logic dcc_out, clk_mon, locked, d_h;
  logic [7:0] dcdl_code;
  logic [5:0] ncnt_train;
  int checks = 0, failures = 0;
  int n_odd = 0, n_cnt_mode = 0, n_half = 0, n_up = 0, n_dn = 0, n_retrain = 0;
  realtime per = 10000.0, duty = 0.5;
  bit run_clk = 1'b0;
  logic dfi_clk, dfi_rddata_valid, dfi_wrdata_en = 1'b0;
  logic [3:0][3:0] dfi_row = '1, dfi_col = '1;
  logic [3:0] dfi_wrdata = '0, dfi_rddata;
  logic ck_t, ck_c, dq_out, dq_oe, wdqs_t, wdqs_c, dq_in = 1'b0, rdqs_t = 1'b0;
  logic [3:0] row_out, col_out;
  logic dfi_cke = 1'b1, test_mode = 1'b0, cke;
  int n_test_mode = 0, n_resume = 0;

  // power-down: the input clock stops for a while and comes back at the same
  // frequency; the stored training result must give a corrected clock at
  // once, without a new training
  task automatic stop_and_resume();
    real worst, mon, op;
    @(negedge clk_p) run_clk = 1'b0;
    #(per * 40.0);
    chk(locked === 1'b1, "still locked with the clock stopped");
    run_clk = 1'b1;
    repeat (2) @(posedge clk_mon);
    chk(locked === 1'b1, "no retraining after the clock returns");
    measure_duty(worst, mon, op);
    chk(worst <= 0.01, $sformatf("duty error %0.3f %% right after the clock returns", worst * 100.0));
    n_resume++;
  endtask
  int n_act = 0, n_wr = 0, n_rd = 0, n_pre = 0, n_wr_ok = 0, n_rd_ok = 0, n_sessions = 0;

  hbm_clocking_top dut (.*);

  // ---- memory model: decodes commands at CK_t rising edges, takes write
  // data on DQ in the beats where WDQS toggles, answers reads
  logic [3:0] mem_word = '0, wr_bits = '0;
  int wr_beat = 0;
  bit mem_on = 1'b0;
  always @(posedge ck_t) if (mem_on) begin
    #(per / 4.0);
    if (row_out[0] === 1'b0 && row_out[1] === 1'b1) n_act++;
    if (row_out[0] === 1'b1 && row_out[1] === 1'b1 && row_out[2] === 1'b0) n_pre++;
    if (col_out[0] === 1'b1 && col_out[1] === 1'b0 && col_out[2] === 1'b0) n_wr++;
    if (col_out[0] === 1'b1 && col_out[1] === 1'b0 && col_out[2] === 1'b1) begin
      n_rd++;
      fork read_return(); join_none
    end
  end
  always @(ck_t) if (mem_on) begin
    #(per / 4.0);
    if (dq_oe) begin
      if (wdqs_t !== ((wr_beat % 2) == 0)) begin
        failures++; $display("FAIL write strobe beat %0d", wr_beat);
      end
      wr_bits[wr_beat] = dq_out;
      wr_beat++;
      if (wr_beat == 4) begin mem_word = wr_bits; wr_beat = 0; end
    end
  end
  task automatic read_return();
    repeat (2) @(posedge ck_t);
    for (int b = 0; b < 4; b++) begin
      dq_in = mem_word[b];
      #(per / 4.0) rdqs_t = ~rdqs_t;
      #(per / 4.0);
    end
  endtask

  // ---- controller: one DFI word per controller cycle
  typedef struct packed {
    logic [3:0][3:0] row;
    logic [3:0][3:0] col;
    logic [3:0]      wrdata;
    logic            wren;
  } dfi_word_t;

  localparam logic [3:0] ONES = 4'b1111, CMD = 4'b1110;  // command in bit 0

  task automatic phy_session();
    dfi_word_t seq[24];
    logic [3:0] wdata;
    logic [3:0] got;
    int a0 = n_act, w0 = n_wr, r0 = n_rd, p0 = n_pre;
    wdata = 4'($urandom_range(1, 14));
    foreach (seq[i]) seq[i] = '{row: {4{ONES}}, col: {4{ONES}}, wrdata: 4'b0, wren: 1'b0};
    seq[2].row[0] = CMD;                          // ACT: R0 low, R1 high
    seq[6].col[1] = CMD; seq[6].col[2] = CMD;     // WR:  C0 high, C1 low, C2 low
    seq[7].wrdata = wdata; seq[7].wren = 1'b1;
    seq[11].col[1] = CMD;                         // RD:  C0 high, C1 low, C2 high
    seq[20].row[2] = CMD;                         // PRE: R0 high, R1 high, R2 low
    mem_on = 1'b1; wr_beat = 0;
    got = 4'hx;
    fork
      begin
        foreach (seq[i]) begin
          @(posedge dfi_clk); #1;
          dfi_row = seq[i].row; dfi_col = seq[i].col;
          dfi_wrdata = seq[i].wrdata; dfi_wrdata_en = seq[i].wren;
        end
        repeat (4) @(posedge dfi_clk);
      end
      begin
        fork
          begin @(posedge dfi_rddata_valid); got = dfi_rddata; end
          repeat (30) @(posedge dfi_clk);
        join_any
        disable fork;
      end
    join
    mem_on = 1'b0;
    n_sessions++;
    chk(n_act - a0 == 1, "one ACTIVATE at the memory");
    chk(n_wr - w0 == 1, "one WRITE at the memory");
    chk(n_rd - r0 == 1, "one READ at the memory");
    chk(n_pre - p0 == 1, "one PRECHARGE at the memory");
    chk(mem_word == wdata, $sformatf("memory holds %h, written %h", mem_word, wdata));
    if (mem_word == wdata) n_wr_ok++;
    chk(got === wdata, $sformatf("read returned %h, written %h", got, wdata));
    if (got === wdata) n_rd_ok++;
    // test mode: the PHY clock appears on CKE
    chk(cke === 1'b1, "CKE carries the clock-enable bit");
    test_mode = 1'b1;
    repeat (4) begin
      @(ck_t); #(per / 4.0);
      chk(cke === ck_t, "CKE follows the clock in test mode");
    end
    test_mode = 1'b0;
    n_test_mode++;
  endtask

  initial begin
    forever begin
      if (run_clk) begin
        clk_p = 1'b1; clk_n = 1'b0; #(per * duty);
        clk_p = 1'b0; clk_n = 1'b1; #(per * (1.0 - duty));
      end else #100;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (T=%0.1f ps duty=%0.2f)", what, per, duty);
    end
  endtask

  task automatic measure_duty(output real worst_out, output real mon_duty, output real out_per);
    real tr, tf, tr2, h;
    worst_out = 0.0;
    repeat (6) begin
      @(posedge dcc_out); tr = $realtime;
      @(negedge dcc_out); tf = $realtime;
      @(posedge dcc_out); tr2 = $realtime;
      h = (tf - tr) / per;
      if (h - 0.5 > worst_out) worst_out = h - 0.5;
      if (0.5 - h > worst_out) worst_out = 0.5 - h;
      out_per = tr2 - tr;
    end
    @(posedge clk_mon); tr = $realtime;
    @(negedge clk_mon); tf = $realtime;
    mon_duty = (tf - tr) / per;
  endtask

  task automatic run_case(real t, real d, bit by_request);
    int n, raw;
    real worst, mon, op;
    per = t; duty = d;
    if (by_request) begin
      #(per * 7.3);   // new frequency settles, then request training
      @(negedge clk_mon) train_req = 1'b1;
      @(posedge clk_mon); #1 train_req = 1'b0;
      n_retrain++;
    end else begin
      rst_n = 1'b0; run_clk = 1'b1;
      repeat (3) @(posedge clk_mon);
      #(per * 0.3);
      rst_n = 1'b1;
    end
    n = 0;
    do begin
      @(posedge clk_mon); n++; #1;
    end while (!locked && n < 60);
    chk(n == 34, $sformatf("lock after %0d cycles", n));
    // Ring periods at maximum delay (t_DL,max = 1116.25 ps) in one period, plus one.
    raw = 1;
    while (2.0 * raw * 1116.25 <= t) raw++;
    if (raw % 2 == 1 && raw != 1) begin
      n_odd++;
      chk(int'(ncnt_train) == raw + 1, "odd count raised to even");
    end
    if (d_h) n_half++; else n_cnt_mode++;
    n_up += $countones(dcdl_code);
    n_dn += 8 - $countones(dcdl_code);
    repeat (3) @(posedge clk_mon);
    measure_duty(worst, mon, op);
    chk(worst <= 0.01, $sformatf("output duty error %0.3f %%", worst * 100.0));
    chk(mon > d - 0.005 && mon < d + 0.005, $sformatf("monitor duty %0.3f", mon));
    chk(op > t - 1.0 && op < t + 1.0, $sformatf("output period %0.1f", op));
    $display("f=%7.1f MHz in-duty=%2.0f %%  C=%0d D_H=%0d code=%0d  out duty err=%0.3f %%",
             1.0e6 / t, d * 100.0, ncnt_train, d_h, dcdl_code, worst * 100.0);
  endtask

  initial begin
    #1;
    run_case(20000.0, 0.2, 1'b0);   // 50 MHz
    phy_session();
    run_case(20000.0, 0.8, 1'b0);
    run_case(625.0,   0.2, 1'b0);   // 1.6 GHz
    phy_session();
    run_case(625.0,   0.8, 1'b1);
    stop_and_resume();
    run_case(5000.0,  0.2, 1'b1);   // 200 MHz: odd count
    run_case(1250.0,  0.8, 1'b1);   // 800 MHz
    phy_session();
    run_case(2500.0,  0.2, 1'b0);   // 400 MHz
    run_case(10000.0, 0.8, 1'b1);   // 100 MHz
    stop_and_resume();
    run_case(1600.0,  0.3, 1'b1);
    run_case(7000.0,  0.7, 1'b0);
    $display("mechanisms: odd->even %0d, counter mode %0d, half-delay %0d, UP %0d, DN %0d, retrain %0d",
             n_odd, n_cnt_mode, n_half, n_up, n_dn, n_retrain);
    $display("clock stop and resume %0d; PHY: sessions %0d (each with test mode), ACT %0d, WR %0d, RD %0d, PRE %0d, write data ok %0d, read data ok %0d",
             n_resume, n_sessions, n_act, n_wr, n_rd, n_pre, n_wr_ok, n_rd_ok);
    chk(n_act > 0 && n_wr > 0 && n_rd > 0 && n_pre > 0, "all four commands sent through the PHY");
    chk(n_wr_ok > 0, "write through the PHY occurred");
    chk(n_rd_ok > 0, "read through the PHY occurred");
    chk(n_test_mode > 0, "test mode occurred");
    chk(n_resume > 0, "resume after a stopped clock occurred");
    chk(n_odd > 0, "odd repeat count occurred");
    chk(n_cnt_mode > 0, "counter mode occurred");
    chk(n_half > 0, "half-delay mode occurred");
    chk(n_up > 0, "UP decision occurred");
    chk(n_dn > 0, "DN decision occurred");
    chk(n_retrain > 0, "retraining on request occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(50_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
