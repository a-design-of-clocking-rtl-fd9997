`timescale 1ps/1fs
// hbm_des4: 1:4 double-data-rate deserializer for the read data of one DQ pin
// of the HBM controller PHY.
//
// The memory returns read data with a read strobe `dqs` that toggles only
// during a burst: it rises in the middle of the first bit, falls in the middle
// of the second, and so on, with four bits per burst (burst length 4). The
// deserializer samples `dq` at both edges of the strobe, so bits 0 and 2 are
// taken at rising edges and bits 1 and 3 at falling edges. At the second
// falling edge the complete word is stored and a toggle flag flips.
//
// The word then crosses into the controller's clock domain `dfi_clk`: the flag
// passes two synchronizing flip-flops, and when its synchronized value changes
// the stored word, which has been stable for two `dfi_clk` cycles by then, is
// copied to `rd_data` and `rd_valid` is high for one `dfi_clk` cycle. Bursts
// must be at least three `dfi_clk` cycles apart.
//
// Timing: `rd_valid` rises at the second or third rising edge of `dfi_clk`
// after the last strobe edge of the burst.
//
// The four bits per pin per controller cycle follow the published PHY, which
// verifies one DQ pin with reads and writes; the strobe framing, the burst
// length and the toggle synchronizer are this design's choices.
module hbm_des4 (
  input  logic       dqs,       // read strobe from the memory, idle low
  input  logic       dq,        // read data, centred on the strobe edges
  input  logic       dfi_clk,   // controller clock
  input  logic       rst_n,     // asynchronous reset, active low
  output logic [3:0] rd_data,   // received word, bit 0 received first
  output logic       rd_valid   // one dfi_clk cycle per received word
);
  logic       second;           // strobe is in the second cycle of a burst
  logic       b0, b2, b1;
  logic [3:0] word;
  logic       tog;
  logic [2:0] sync;

  always_ff @(posedge dqs or negedge rst_n) begin
    if (!rst_n)      begin b0 <= 1'b0; b2 <= 1'b0; end
    else if (second) b2 <= dq;
    else             b0 <= dq;
  end

  always_ff @(negedge dqs or negedge rst_n) begin
    if (!rst_n) begin
      b1     <= 1'b0;
      second <= 1'b0;
      word   <= '0;
      tog    <= 1'b0;
    end else if (second) begin
      word   <= {dq, b2, b1, b0};
      tog    <= ~tog;
      second <= 1'b0;
    end else begin
      b1     <= dq;
      second <= 1'b1;
    end
  end

  always_ff @(posedge dfi_clk or negedge rst_n) begin
    if (!rst_n) begin
      sync     <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      sync     <= {sync[1:0], tog};
      rd_valid <= sync[2] ^ sync[1];
      if (sync[2] ^ sync[1]) rd_data <= word;
    end
  end
endmodule
