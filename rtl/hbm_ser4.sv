`timescale 1ps/1fs
// hbm_ser4: 4:1 double-data-rate serializer for one pin of the HBM controller
// PHY.
//
// The memory controller talks to the PHY with a 2:1 frequency ratio: the PHY
// clock `clk` runs at twice the controller (DFI) clock, and the controller
// hands over four bits per pin in each of its cycles. The PHY sends those four
// bits in two PHY clock cycles, one in each half cycle, so the output uses
// both clock edges. This is why the PHY clock needs a 50 % duty cycle: a
// distorted clock shortens every other bit.
//
// How it works. A phase flag divides `clk` by two and is brought out as the
// DFI clock `dfi_clk`. At every rising edge of `clk` at which the flag is 0
// (which is when `dfi_clk` rises) the word `din` is captured. The bit for the
// coming high half cycle is prepared at the falling edge before it (`q_hi`),
// the bit for the coming low half cycle at the rising edge before it (`q_lo`),
// and `dout = clk ? q_hi : q_lo`. Each register changes only while the mux
// selects the other one, so the output carries no glitch from the registers.
//
// Timing. A word captured at rising edge P0 leaves as din[0] in the high half
// of the cycle after P0, din[1] in its low half, din[2] and din[3] in the next
// cycle. So bit k of a word appears (1 + k/2) PHY cycles after its capture;
// one word per DFI cycle, no gaps. The caller must hold `din` stable around
// the rising edge of `dfi_clk`.
//
// The 2:1 ratio and the four bits per pin per controller cycle follow the
// published PHY. The bit order (bit 0 first), the one-cycle latency and the
// mux structure are this design's choices.
module hbm_ser4 (
  input  logic       clk,      // PHY clock, duty corrected
  input  logic       rst_n,    // asynchronous reset, active low
  input  logic [3:0] din,      // four bits for this pin, bit 0 sent first
  output logic       dfi_clk,  // clk / 2, rising at the capture edge
  output logic       dout      // serial output, one bit per half cycle
);
  logic       phase;
  logic [3:0] word;
  logic       q_hi, q_lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0;
      word  <= '0;
      q_lo  <= 1'b0;
    end else begin
      phase <= ~phase;
      if (!phase) word <= din;
      q_lo <= phase ? word[1] : word[3];
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_hi <= 1'b0;
    else        q_hi <= phase ? word[0] : word[2];
  end

  assign dfi_clk = phase;
  assign dout    = clk ? q_hi : q_lo;
endmodule
