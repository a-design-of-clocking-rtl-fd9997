`timescale 1ps/1fs
// tb_hbm_phy: drives random words on every controller-side input of the PHY
// and checks every memory-side pin in the middle of each half cycle: the row
// and column command pins, DQ, its output enable and the write strobe must
// carry their words bit 0 first, starting in the high half of the second PHY
// cycle after the word was taken, and the write strobe must toggle exactly in
// the beats of write data. CK_t/CK_c must follow the PHY clock. Read bursts
// are returned by a small memory model with a centred read strobe and must
// come back on the controller side unchanged. CKE must carry the clock-enable
// bit one controller cycle later, or the PHY clock itself in test mode.
module tb_hbm_phy;
  localparam realtime T = 800.0;   // PHY clock period
  logic clk = 1'b0, rst_n = 1'b1;
  logic dfi_clk;
  logic [3:0][3:0] dfi_row = '1, dfi_col = '1;
  logic [3:0] dfi_wrdata = '0;
  logic dfi_wrdata_en = 1'b0, dfi_cke = 1'b0, test_mode = 1'b0;
  logic cke;
  int cke_checks = 0, cke_clock_checks = 0;
  logic [3:0] dfi_rddata;
  logic dfi_rddata_valid;
  logic ck_t, ck_c, dq_out, dq_oe, wdqs_t, wdqs_c;
  logic [3:0] row_out, col_out;
  logic dq_in = 1'b0, rdqs_t = 1'b0;
  int checks = 0, failures = 0, words = 0, reads = 0, reads_ok = 0, strobe_beats = 0;
  logic [3:0] rq[$];

  // in test mode CKE follows the PHY clock
  always @(clk) if (test_mode) begin
    #(T/8);
    checks++; cke_clock_checks++;
    if (cke !== clk) begin failures++; $display("FAIL cke in test mode"); end
  end

  hbm_phy dut (.*);

  always begin #(T/2) clk = ~clk; end

  // the eleven serialized pins as one vector: R0 R1 R2 R4, C0..C3, DQ, OE, WDQS
  function automatic logic [10:0] pins();
    return {wdqs_t, dq_oe, dq_out, col_out, row_out};
  endfunction

  task automatic expect_words(input logic [10:0][3:0] w);
    for (int k = 0; k < 4; k++) begin
      if (k % 2 == 0) @(posedge clk); else @(negedge clk);
      #(T/4);
      for (int p = 0; p < 11; p++) begin
        checks++;
        if (pins()[p] !== w[p][k]) begin
          failures++; $display("FAIL pin %0d bit %0d: %b exp %b", p, k, pins()[p], w[p][k]);
        end
      end
      checks++;
      if (wdqs_c !== ~wdqs_t || ck_t !== (k % 2 == 0) || ck_c !== ~ck_t) begin
        failures++; $display("FAIL complementary pins");
      end
      if (w[10][k]) strobe_beats++;
    end
  endtask

  // memory model: read bursts with the strobe edge in the middle of each bit
  task automatic read_burst(input logic [3:0] w);
    for (int b = 0; b < 4; b++) begin
      dq_in = w[b];
      #(T/4) rdqs_t = ~rdqs_t;
      #(T/4);
    end
    rq.push_back(w);
    reads++;
  endtask

  always @(posedge dfi_clk) if (dfi_rddata_valid) begin
    checks++;
    if (rq.size() == 0 || dfi_rddata !== rq[0]) begin
      failures++; $display("FAIL read word %h", dfi_rddata);
    end else reads_ok++;
    if (rq.size() != 0) void'(rq.pop_front());
  end

  initial begin
    #1 rst_n = 1'b0;
    #(3*T) rst_n = 1'b1;
    repeat (400) begin
      @(posedge clk); #1;
      if (dfi_clk) begin
        logic [10:0][3:0] w;
        for (int p = 0; p < 4; p++) begin w[p] = dfi_row[p]; w[4 + p] = dfi_col[p]; end
        w[8]  = dfi_wrdata;
        w[9]  = {4{dfi_wrdata_en}};
        w[10] = {2{1'b0, dfi_wrdata_en}};
        fork expect_words(w); join_none
        words++;
        #1;
        for (int p = 0; p < 4; p++) begin dfi_row[p] = 4'($urandom); dfi_col[p] = 4'($urandom); end
        dfi_wrdata    = 4'($urandom);
        dfi_wrdata_en = 1'($urandom);
        if (words % 5 == 0) fork read_burst(4'($urandom)); join_none
        // CKE: the bit taken at this edge shows until the next one
        begin
          logic exp_cke;
          exp_cke = dfi_cke;               // taken at this edge
          #(T/4);
          if (!test_mode) begin
            checks++; cke_checks++;
            if (cke !== exp_cke) begin failures++; $display("FAIL cke=%b exp %b", cke, exp_cke); end
          end
          dfi_cke = 1'($urandom);
          test_mode = (words > 150);
        end
      end
    end
    #(8*T);
    checks += 3;
    if (words != 200) begin failures++; $display("FAIL %0d words", words); end
    if (reads == 0 || reads_ok != reads) begin failures++; $display("FAIL reads %0d of %0d", reads_ok, reads); end
    checks++;
    if (cke_checks == 0 || cke_clock_checks == 0) begin failures++; $display("FAIL CKE not exercised"); end
    if (strobe_beats == 0) begin failures++; $display("FAIL no write strobe"); end
    $display("words %0d, write strobe beats %0d, reads %0d", words, strobe_beats, reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000*T);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
