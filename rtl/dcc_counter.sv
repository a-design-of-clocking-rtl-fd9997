`timescale 1ps/1fs
// dcc_counter: the counter (CNT) of the counter-based half-cycle delay line.
//
// While the HCDL enable `en` is high the delay-line ring oscillates and this
// counter counts the rising edges of its output CLK_DL; each rising edge marks
// two passes through the delay line (2*t_DL). When the count reaches `target`
// the counter pulls CLK_FB low, which is the falling edge the edge combiner
// (or, in training, the phase detector) waits for. CLK_FB stays low until the
// enable falls; a low enable clears the counter asynchronously and releases
// CLK_FB high again. The reset also clears the count.
//
// `target` = 0 turns the comparison off: the counter then only counts, as in
// repeat-count (N_CNT) training, and the count reached when the enable falls
// is captured in `cnt_capt` for the training FSM. Capture at the enable's
// falling edge follows the published description ("check the counted value at
// the falling edge of CLK_FSM"); the target-0 convention, the saturation at
// all ones and the capture register are this implementation's choices.
module dcc_counter #(
  parameter int CNT_W = dcc_pkg::CNT_W
) (
  input  logic             clk_dl,    // CLK_DL, delay-line ring output
  input  logic             en,        // HCDL enable; low clears the count
  input  logic             rst_n,     // asynchronous reset of count and capture
  input  logic [CNT_W-1:0] target,    // rising edges before CLK_FB falls; 0 = never
  output logic             cnt_fb,    // counter branch of CLK_FB (active-low edge)
  output logic [CNT_W-1:0] cnt_capt   // count at the last falling edge of en
);
  logic [CNT_W-1:0] cnt;

  // Both clears act on their own edge, so a reset clears the count even
  // while the enable is already low.
  always_ff @(posedge clk_dl or negedge en or negedge rst_n) begin
    if (!en || !rst_n)    cnt <= '0;
    else if (cnt != '1)   cnt <= cnt + 1'b1;
  end

  always_ff @(negedge en or negedge rst_n) begin
    if (!rst_n) cnt_capt <= '0;
    else        cnt_capt <= cnt;
  end

  always_comb cnt_fb = ~((target != '0) && (cnt >= target));
endmodule
