// Two-digit countdown timer for a small CPLD board.
//
// The 50 MHz board clock feeds a two-stage prescaler: its first output
// (about 1 kHz) is the buzzer tone, its second (about 167 Hz) clocks the
// countdown state machine. The machine's units digit (0-9) and tens digit
// (0-7, zero-extended to four bits) each drive a seven-segment decoder,
// and its buzzer enable gates the tone onto the differential buzzer
// outputs.
// Interface (all buttons and switches active low, as wired on the board):
//   rst_n         asynchronous reset button, gives 70 on the display
//   start_btn_n   starts the countdown
//   set_btn_n     held low: set mode, the tens preset follows set_switch_n
//   set_switch_n  tens preset 0..7, inverted (switch on = '0')
//   display1/10   units / tens digit, segments a..g,dp in bits 7..0, low lit
//   buzzer_plus/minus  antiphase buzzer terminals
// Timing at the default factors: one countdown step every 300,012 board
// cycles (6.0 ms); a start from T0 reaches 00 after 10*T+1 steps, then 16
// steps of finish with 8 one-step beeps, one step of reload, and the
// display shows the preset again.
// Structure and constants are those of the reference design. The state
// machine and the buzzer run on flip-flop-generated clocks, as there; a
// build for a larger device could use clock enables instead.
module state_demo
  import stopwatch_pkg::*;
#(
  parameter int unsigned DIV_FACTOR_SM  = 250000,
  parameter int unsigned DIV_FACTOR_BUZ = 50000
) (
  input  logic       clk_50mhz,
  input  logic       rst_n,
  output seg_t       display1,
  output seg_t       display10,
  input  logic       start_btn_n,
  input  logic       set_btn_n,
  input  logic [2:0] set_switch_n,
  output logic       buzzer_plus,
  output logic       buzzer_minus
);

  logic  clk_sm;
  logic  clk_buzzer;
  ones_t bcd_ones;
  tens_t bcd_tens;
  logic  buzzer_enable;

  prescaler #(
    .DIV_FACTOR_SM  (DIV_FACTOR_SM),
    .DIV_FACTOR_BUZ (DIV_FACTOR_BUZ)
  ) u_prescaler (
    .clk      (clk_50mhz),
    .rst_n    (rst_n),
    .clk_out1 (clk_buzzer),
    .clk_out2 (clk_sm)
  );

  countdown_sm u_sm (
    .clk          (clk_sm),
    .rst_n        (rst_n),
    .cnt_ones     (bcd_ones),
    .cnt_tens     (bcd_tens),
    .start_btn_n  (start_btn_n),
    .set_btn_n    (set_btn_n),
    .set_switch_n (set_switch_n),
    .buzzer_en    (buzzer_enable)
  );

  bcd2seg u_seg_ones (
    .bcd_in  (bcd_ones),
    .display (display1)
  );

  bcd2seg u_seg_tens (
    .bcd_in  ({1'b0, bcd_tens}),
    .display (display10)
  );

  buzzer u_buzzer (
    .clk_drive (clk_buzzer),
    .enable    (buzzer_enable),
    .out_plus  (buzzer_plus),
    .out_minus (buzzer_minus)
  );

endmodule
