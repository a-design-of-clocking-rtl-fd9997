`timescale 1ps/1fs
// tb_hbm_des4: sends random four-bit read bursts with a centred read strobe,
// at a random phase to the controller clock and with random gaps, and checks
// that each burst comes out once as one word with the right bit order, that
// rd_valid lasts one controller cycle, and that it rises at the second or
// third rising controller clock edge after the burst's last strobe edge.
module tb_hbm_des4;
  localparam realtime TD = 2000.0;   // controller clock period
  localparam realtime UI = 500.0;    // one bit on DQ
  logic dqs = 1'b0, dq = 1'b0, dfi_clk = 1'b0, rst_n = 1'b1;
  logic [3:0] rd_data;
  logic rd_valid;
  int checks = 0, failures = 0, sent = 0, got = 0;
  logic [3:0] q[$];
  realtime t_end;

  hbm_des4 dut (.dqs (dqs), .dq (dq), .dfi_clk (dfi_clk), .rst_n (rst_n),
                .rd_data (rd_data), .rd_valid (rd_valid));

  always begin #(TD/2) dfi_clk = ~dfi_clk; end

  // count rising controller edges since the end of the last burst
  int edges_since;
  always @(posedge dfi_clk) begin
    edges_since++;
    if (rd_valid) begin
      got++;
      checks += 3;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected word %h", rd_data); end
      else if (rd_data !== q[0]) begin failures++; $display("FAIL word %h exp %h", rd_data, q[0]); end
      if (q.size() != 0) void'(q.pop_front());
      // rd_valid became visible at this edge; it was set at the previous one
      if (edges_since - 1 < 2 || edges_since - 1 > 3) begin
        failures++; $display("FAIL latency %0d edges", edges_since - 1);
      end
      #1;
      if (rd_valid) begin failures++; $display("FAIL rd_valid longer than one cycle"); end
    end
  end

  task automatic burst(input logic [3:0] w);
    for (int b = 0; b < 4; b++) begin
      dq = w[b];
      #(UI/2) dqs = ~dqs;
      #(UI/2);
    end
    q.push_back(w);
    sent++;
    edges_since = 0;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #(3*TD) rst_n = 1'b1;
    #(1.3*TD);
    repeat (100) begin
      burst(4'($urandom));
      #(3*TD + real'($urandom_range(0, 4000)));
    end
    #(4*TD);
    checks++;
    if (got != sent) begin failures++; $display("FAIL %0d words out of %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000*TD);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
