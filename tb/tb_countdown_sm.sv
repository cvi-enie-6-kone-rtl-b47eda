// Self-checking testbench for countdown_sm.
//
// Drives the state machine's clock directly and changes inputs on the
// falling edge. The checks are written against the timer's behaviour, not
// its code:
//   - after reset the display reads 70 and nothing happens without a button;
//   - in set mode the tens digit follows the inverted switches, units read 0;
//   - a countdown from every preset T0 (T = 0..7) steps the two-digit value
//     down by exactly one per clock, reaches 00 after 10*T clocks and
//     leaves RUN_DOWN one clock later;
//   - the finish phase lasts 16 clocks with the buzzer enable on every
//     other clock (8 beeps, starting with the first clock);
//   - one clock later the display shows the preset again and a new start
//     works; a set request wins over a simultaneous start;
//   - an asynchronous reset in the middle of a countdown restores 70.
module tb_countdown_sm;
  import stopwatch_pkg::*;

  logic       clk = 0, rst_n = 1;
  ones_t      ones;
  tens_t      tens;
  logic       start_n = 1, set_n = 1;
  logic [2:0] sw_n = 3'b111;
  logic       buz;
  int         checks = 0, failures = 0;

  countdown_sm dut (
    .clk(clk), .rst_n(rst_n), .cnt_ones(ones), .cnt_tens(tens),
    .start_btn_n(start_n), .set_btn_n(set_n), .set_switch_n(sw_n),
    .buzzer_en(buz));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int shown();
    return int'(tens) * 10 + int'(ones);
  endfunction

  task automatic expect_val(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // Starts a countdown from the currently shown preset and follows it to
  // the reload, checking every clock.
  task automatic run_one(int preset);
    int beeps, value;
    expect_val("preset shown", shown(), preset * 10);
    start_n = 0; tick(); start_n = 1;      // WAIT -> RUN_DOWN
    expect_val("value at start", shown(), preset * 10);
    value = preset * 10;
    for (int i = 0; i < preset * 10; i++) begin
      tick();
      value--;
      expect_val("countdown step", shown(), value);
      expect_val("no beep while counting", int'(buz), 0);
    end
    tick();                                 // 00 -> FINISH
    expect_val("held at 00", shown(), 0);
    beeps = 0;
    for (int i = 0; i < 16; i++) begin
      expect_val("finish beep pattern", int'(buz), (i % 2 == 0) ? 1 : 0);
      expect_val("digits 00 in finish", shown(), 0);
      beeps += int'(buz);
      tick();
    end
    expect_val("eight beeps", beeps, 8);
    expect_val("silent in refresh", int'(buz), 0);
    tick();                                 // REFRESH -> WAIT
    expect_val("preset reloaded", shown(), preset * 10);
    tick(3);
    expect_val("waits after reload", shown(), preset * 10);
  endtask

  initial begin
    #1 rst_n = 0;
    tick(2);
    expect_val("reset value", shown(), 70);
    rst_n = 1;
    tick(5);
    expect_val("idle without buttons", shown(), 70);

    // set mode follows the switches while held
    set_n = 0; tick();
    for (int v = 0; v < 8; v++) begin
      sw_n = ~3'(v); tick();
      expect_val("set mode tens", int'(tens), v);
      expect_val("set mode units", int'(ones), 0);
    end
    sw_n = ~3'd1; tick();
    set_n = 1; tick();
    sw_n = ~3'd5; tick(3);
    expect_val("switches ignored outside set mode", shown(), 10);

    for (int p = 0; p <= 7; p++) begin
      set_n = 0; sw_n = ~3'(p); tick(2); set_n = 1; tick();
      run_one(p);
    end

    // set request wins over a simultaneous start
    set_n = 0; start_n = 0; sw_n = ~3'd3; tick(2);
    start_n = 1; set_n = 1; tick(2);
    expect_val("set wins over start", shown(), 30);
    tick(3);
    expect_val("no countdown after set", shown(), 30);

    // asynchronous reset in the middle of a countdown
    start_n = 0; tick(); start_n = 1; tick(7);
    expect_val("counting before reset", shown(), 23);
    #2 rst_n = 0; #1;
    expect_val("async reset value", shown(), 70);
    tick(); rst_n = 1; tick(2);
    expect_val("idle after reset", shown(), 70);
    run_one(7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
