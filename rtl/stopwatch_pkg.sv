// Shared types and constants of the countdown timer.
//
// The state machine's five states, the width of the two display digits
// and the active-low polarity conventions of the board (push-buttons and
// DIP switches read '0' when pressed / switched on, seven-segment
// outputs light a segment with '0') are collected here so that the
// controller, the decoder and the testbenches agree on them.
// The state names follow the reference design; the 3-bit state encoding
// is left to the synthesis tool (an unencoded enum).
package stopwatch_pkg;

  // Controller states.
  typedef enum logic [2:0] {
    ST_WAIT_FOR_START, // idle, showing the preset, waiting for start or set
    ST_REFRESH,        // reload the preset after the finish tone
    ST_RUN_DOWN,       // count the two digits down by one per clock
    ST_SET_TIME,       // follow the DIP switches while set mode is held
    ST_FINISH          // count out the intermittent buzzer tone
  } sm_state_e;

  localparam int unsigned ONES_W = 4;  // BCD units digit
  localparam int unsigned TENS_W = 3;  // tens digit, 0..7

  typedef logic [ONES_W-1:0] ones_t;
  typedef logic [TENS_W-1:0] tens_t;

  // Seven-segment pattern: bit 7..0 = a, b, c, d, e, f, g, dp, active low.
  typedef logic [7:0] seg_t;

endpackage
