// Countdown state machine of the two-digit timer.
//
// States (stopwatch_pkg::sm_state_e):
//   WAIT_FOR_START  shows the preset; set_btn_n low enters SET_TIME,
//                   otherwise start_btn_n low enters RUN_DOWN.
//   SET_TIME        while set_btn_n is held low, the tens digit and the
//                   stored preset follow the inverted DIP switches and the
//                   units digit is 0; releasing set_btn_n returns to
//                   WAIT_FOR_START.
//   RUN_DOWN        one step per clock: the units digit counts down, and
//                   at 0 reloads 9 while the tens digit borrows. At 00 the
//                   machine enters FINISH (the step from 00 is the one
//                   extra clock), so a start from T0 takes 10*T+1 clocks.
//   FINISH          digits held at 00 while a FINISH_W-bit counter counts
//                   down from all ones; buzzer_en is high on every cycle
//                   whose count is odd, giving 2**(FINISH_W-1) beeps of one
//                   clock each. After count 0 it goes to REFRESH.
//   REFRESH         reloads the preset into the tens digit, clears the
//                   units digit, re-arms the finish counter and returns to
//                   WAIT_FOR_START.
// Reset (asynchronous, active low) gives 70 on the display, preset 7, and
// state WAIT_FOR_START. Inputs are active low and sampled on the rising
// clock edge without synchronisers or debouncing: the slow clock
// (about 167 Hz by default) is what tames button bounce.
// All of this follows the reference design. The assertion is an addition that
// checks the units digit never leaves the BCD range.
module countdown_sm
  import stopwatch_pkg::*;
#(
  parameter int unsigned FINISH_W = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  output ones_t       cnt_ones,
  output tens_t       cnt_tens,
  input  logic        start_btn_n,
  input  logic        set_btn_n,
  input  logic [2:0]  set_switch_n,
  output logic        buzzer_en
);

  sm_state_e           state;
  tens_t               tens_preset;
  logic [FINISH_W-1:0] cnt_finish;

  assign buzzer_en = (state == ST_FINISH) && cnt_finish[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_ones    <= '0;
      cnt_tens    <= '1;
      tens_preset <= '1;
      cnt_finish  <= '1;
      state       <= ST_WAIT_FOR_START;
    end else begin
      units_in_bcd_range: assert (cnt_ones <= ones_t'(9))
        else $error("units digit out of BCD range: %0d", cnt_ones);
      unique case (state)
        ST_WAIT_FOR_START: begin
          if (!set_btn_n)        state <= ST_SET_TIME;
          else if (!start_btn_n) state <= ST_RUN_DOWN;
        end

        ST_RUN_DOWN: begin
          if (cnt_ones != '0) begin
            cnt_ones <= cnt_ones - 1'b1;
          end else if (cnt_tens != '0) begin
            cnt_ones <= ones_t'(9);
            cnt_tens <= cnt_tens - 1'b1;
          end else begin
            state <= ST_FINISH;
          end
        end

        ST_FINISH: begin
          cnt_ones <= '0;
          cnt_tens <= '0;
          if (cnt_finish != '0) cnt_finish <= cnt_finish - 1'b1;
          else                  state      <= ST_REFRESH;
        end

        ST_REFRESH: begin
          cnt_tens   <= tens_preset;
          cnt_ones   <= '0;
          cnt_finish <= '1;
          state      <= ST_WAIT_FOR_START;
        end

        ST_SET_TIME: begin
          cnt_tens    <= ~set_switch_n;
          tens_preset <= ~set_switch_n;
          cnt_ones    <= '0;
          if (set_btn_n) state <= ST_WAIT_FOR_START;
        end

        default: state <= ST_WAIT_FOR_START;
      endcase
    end
  end

endmodule
