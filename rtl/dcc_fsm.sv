`timescale 1ps/1fs
// dcc_fsm: training state machine of the duty-cycle corrector.
//
// After reset, or when `train_req` is seen in normal operation, the FSM finds
// the two settings of the counter-based half-cycle delay line (HCDL): the
// repeat count N_CNT and the 8-bit DCDL code that sets the delay t_DL of one
// pass. It trains against one full input period T_REF, the high phase of the
// divider output CLK_FSM, so it finds 2*N_CNT; normal operation uses half.
//
// Schedule, counted in rising edges e0, e1, ... of the input clock:
//   e0..e1   N_CNT training. The code is at its maximum delay and the HCDL
//            counter only counts CLK_DL rising edges during CLK_FSM high.
//   e2       The captured count plus one is the training count C. An odd C
//            other than 1 is raised by one so that it can be halved later;
//            C = 1 selects half-delay mode (D_H). Bit 7 of the code is cleared
//            for its trial.
//   bit b    four cycles from s = 2 + 4*(7-b): at e(s) the trial starts with
//            bit b = 0 (lower bits still 1) and CLK_FSM rises; at e(s+1)
//            CLK_FSM falls and the phase detector compares; at e(s+2), the
//            ready phase, bit b is set to UP (1: the loop was too short) or
//            kept 0; e(s+3) is idle.
// CLK_FSM is high only in the measuring cycle of each slot (e0, e2, e6, ...),
// so the loop is idle when the switch hands the HCDL over to CLK_OUT; had
// the pulse also been repeated in the ready phase, the counter could still be
// holding CLK_FB low at the hand-over and the loop would stall.
//   e33      Last edge of training. From here the switch feeds the HCDL from
//            the corrector output, the target becomes C/2 (or D_H is applied)
//            and `locked` rises: 2 + 8*4 = 34 cycles in all.
// The code starts at all ones and untested bits stay 1, so the search ends on
// the smallest code whose training loop is at least one period long.
//
// The schedule, the odd-count rule, the half-delay rule and the 34-cycle total
// follow the published design. Adding one to the captured count (the counter
// "reset to 1") and saturating C at 2*NCNT_MAX are this implementation's
// reading of it.
//
// Interface: all outputs are registers or decode of registers clocked by the
// rising edge of `clk` (the input clock), with an asynchronous active-low
// reset. `cnt_capt` and `pd_up` come from other clock domains but are stable
// for at least one input period before they are read.
module dcc_fsm #(
  parameter int CODE_W   = dcc_pkg::CODE_W,
  parameter int CNT_W    = dcc_pkg::CNT_W,
  parameter int NCNT_MAX = dcc_pkg::NCNT_MAX
) (
  input  logic              clk,          // CLK_IN, rising edges only
  input  logic              rst_n,        // asynchronous reset, starts training
  input  logic              train_req,    // request a new training (in normal)
  input  logic [CNT_W-1:0]  cnt_capt,     // HCDL count captured at end of window
  input  logic              pd_up,        // phase detector: loop too short
  output logic              clk_fsm,      // CLK_FSM reference pulse (T_REF wide)
  output logic              d_tr,         // 1 during training (switch select)
  output logic              d_h,          // half-delay mode, applied in normal
  output logic              locked,       // training done, normal operation
  output logic [CODE_W-1:0] code,         // DCDL code {CDL, FDL}
  output logic [CNT_W-1:0]  cnt_target,   // counter target; 0 = count only
  output logic [CNT_W-1:0]  ncnt_train,   // training count C (= 2*N_CNT)
  output dcc_pkg::dcc_state_e state
);
  localparam int CMAX = 2 * NCNT_MAX;
  localparam int LAST = dcc_pkg::TRAIN_CYCLES - 1;  // 33

  logic [5:0]       cyc;
  logic             dh_q;
  logic [CNT_W:0]   c_raw;       // captured count + 1, one bit wider
  logic [CNT_W-1:0] c_sat, c_even;
  logic [5:0]       slot;        // cyc - 2
  logic [2:0]       bit_sel;     // code bit under test
  logic [1:0]       phase;       // position inside the 4-cycle bit slot
  logic             pulse_start; // CLK_FSM rises at this edge

  dcc_divider u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (pulse_start),
    .clk_div (clk_fsm)
  );

  always_comb begin
    c_raw   = {1'b0, cnt_capt} + 1'b1;
    c_sat   = (c_raw > (CNT_W+1)'(CMAX)) ? CNT_W'(CMAX) : c_raw[CNT_W-1:0];
    c_even  = (c_sat[0] && c_sat != CNT_W'(1)) ? c_sat + 1'b1 : c_sat;
    slot    = cyc - 6'd2;
    bit_sel = 3'(CODE_W - 1 - int'(slot[5:2]));
    phase   = slot[1:0];
    pulse_start = ((state == dcc_pkg::ST_NCNT) && (cyc == 6'd0)) ||
                  ((state == dcc_pkg::ST_DCDL) && (phase == 2'd0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= dcc_pkg::ST_NCNT;
      cyc        <= '0;
      code       <= '1;
      cnt_target <= '0;
      ncnt_train <= '0;
      dh_q       <= 1'b0;
    end else begin
      unique case (state)
        dcc_pkg::ST_NORMAL: begin
          if (train_req) begin
            state      <= dcc_pkg::ST_NCNT;
            cyc        <= '0;
            code       <= '1;
            cnt_target <= '0;
            dh_q       <= 1'b0;
          end
        end
        dcc_pkg::ST_NCNT: begin
          cyc <= cyc + 1'b1;
          if (cyc == 6'(dcc_pkg::NCNT_CYCLES - 1)) state <= dcc_pkg::ST_DCDL;
        end
        dcc_pkg::ST_DCDL: begin
          cyc <= cyc + 1'b1;
          if (cyc == 6'(dcc_pkg::NCNT_CYCLES)) begin
            ncnt_train <= c_even;
            cnt_target <= c_even;
            dh_q       <= (c_even == CNT_W'(1));
          end
          if (phase == 2'd0) code[bit_sel] <= 1'b0;
          if (phase == 2'd2) code[bit_sel] <= pd_up;
          if (cyc == 6'(LAST)) begin
            state      <= dcc_pkg::ST_NORMAL;
            cnt_target <= dh_q ? CNT_W'(1) : (ncnt_train >> 1);
          end
        end
        default: state <= dcc_pkg::ST_NCNT;
      endcase
    end
  end

  always_comb begin
    d_tr   = (state != dcc_pkg::ST_NORMAL);
    locked = (state == dcc_pkg::ST_NORMAL);
    d_h    = dh_q && (state == dcc_pkg::ST_NORMAL);
  end

  // Training must follow the 34-cycle schedule.
  a_cyc_bound : assert property (@(posedge clk) disable iff (!rst_n)
                                 state != dcc_pkg::ST_NORMAL |-> cyc <= 6'(LAST));
endmodule
