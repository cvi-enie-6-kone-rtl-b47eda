// Two-stage clock prescaler.
//
// The first stage counts board-clock cycles from 0 up to DIV_FACTOR_BUZ/2;
// on the cycle it reaches that value it clears and toggles clk_out1, so
// clk_out1 is a square wave with a half period of DIV_FACTOR_BUZ/2 + 1
// input cycles (25,001 cycles, about 1 kHz, at the 50 MHz default). It
// drives the buzzer.
// The second stage advances only on those toggle cycles: it counts from 0
// up to DIV_FACTOR_SM/DIV_FACTOR_BUZ and on reaching it clears and toggles
// clk_out2, so clk_out2's half period is DIV_FACTOR_SM/DIV_FACTOR_BUZ + 1
// half periods of clk_out1 (6 x 25,001 = 150,006 input cycles by
// default). clk_out2 clocks the state machine.
// Both outputs come straight from flip-flops, reset low by the
// asynchronous active-low rst_n. Divider structure, comparisons and
// default factors are those of the reference design; the counters are
// sized here to the largest value they reach instead of a fixed 25 bits,
// which does not change their behaviour.
module prescaler #(
  parameter int unsigned DIV_FACTOR_SM  = 250000,
  parameter int unsigned DIV_FACTOR_BUZ = 50000
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out1,   // buzzer drive clock
  output logic clk_out2    // state-machine clock
);

  localparam int unsigned BUZ_LAST = DIV_FACTOR_BUZ / 2;
  localparam int unsigned SM_LAST  = DIV_FACTOR_SM / DIV_FACTOR_BUZ;
  localparam int unsigned BUZ_W    = (BUZ_LAST > 0) ? $clog2(BUZ_LAST + 1) : 1;
  localparam int unsigned SM_W     = (SM_LAST > 0) ? $clog2(SM_LAST + 1) : 1;

  logic [BUZ_W-1:0] cnt_buz;
  logic [SM_W-1:0]  cnt_sm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_buz  <= '0;
      cnt_sm   <= '0;
      clk_out1 <= 1'b0;
      clk_out2 <= 1'b0;
    end else if (cnt_buz < BUZ_W'(BUZ_LAST)) begin
      cnt_buz <= cnt_buz + 1'b1;
    end else begin
      cnt_buz  <= '0;
      clk_out1 <= ~clk_out1;
      if (cnt_sm < SM_W'(SM_LAST)) begin
        cnt_sm <= cnt_sm + 1'b1;
      end else begin
        cnt_sm   <= '0;
        clk_out2 <= ~clk_out2;
      end
    end
  end

endmodule
