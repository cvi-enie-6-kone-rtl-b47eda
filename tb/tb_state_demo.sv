// End-to-end testbench for state_demo at its default parameters.
//
// A 50 MHz clock drives the whole timer with its own prescaler factors
// (one countdown step per 300,012 board cycles), so this is the design
// exactly as it would be programmed into the device. The testbench only
// touches the board-level pins:
//   1. reset: the display must read 70 and the buzzer be idle;
//   2. set mode: set button held, switches at 1 -> display 10; changing
//      the switches after the button is released must be ignored;
//   3. start: the display must count 10, 09, ..., 00 with one step every
//      300,012 board cycles (the tens-to-units borrow happens at 10 -> 09),
//      stay at 00 for the finish phase and return to 10 after exactly
//      18 steps (1 at 00, 16 of finish, 1 of reload);
//   4. the buzzer must sound only during finish: 8 beeps of 6 tone periods
//      (48 rising edges of buzzer_plus), with buzzer_minus always the
//      complement of buzzer_plus;
//   5. reset again and a full countdown from the reset value 70.
// The displays are decoded back to digits from a segment table kept in
// this file. Each mechanism (set mode, ignored switches, start, borrow,
// finish tone, reload, reset) is counted, and one that never occurs is a
// failure.
module tb_state_demo;
  import stopwatch_pkg::*;

  localparam longint STEP = 300012;   // board cycles per state-machine clock

  logic       clk = 0, rst_n = 1;
  seg_t       display1, display10;
  logic       start_n = 1, set_n = 1;
  logic [2:0] sw_n = 3'b111;
  logic       buz_p, buz_m;
  int         checks = 0, failures = 0;
  longint     cycle = 0;

  state_demo dut (
    .clk_50mhz(clk), .rst_n(rst_n), .display1(display1), .display10(display10),
    .start_btn_n(start_n), .set_btn_n(set_n), .set_switch_n(sw_n),
    .buzzer_plus(buz_p), .buzzer_minus(buz_m));

  always #10 clk = ~clk;

  // mechanism counters
  int n_set = 0, n_ignore = 0, n_start = 0, n_borrow = 0, n_tone = 0,
      n_reload = 0, n_reset = 0;

  initial begin
    #3_000_000_000;   // 150 M board cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Lit segments (a..g) of the decimal digits, written independently of
  // the decoder.
  string glyph [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic seg_t pattern(int d);
    seg_t s = 8'hFF;
    for (int i = 0; i < glyph[d].len(); i++) s[7 - (glyph[d][i] - "a")] = 1'b0;
    return s;
  endfunction

  function automatic int digit(seg_t s);
    for (int d = 0; d < 10; d++) if (s == pattern(d)) return d;
    return -100;
  endfunction

  function automatic longint shown();
    return digit(display10) * 10 + digit(display1);
  endfunction

  task automatic expect_val(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  // Board-cycle monitor: display changes and buzzer edges.
  longint chg_cycle [$];
  longint chg_value [$];
  longint prev_value = -1;
  logic   prev_p = 0;
  int     tone_edges = 0, tone_edges_outside = 0;
  int     minus_errors = 0;

  always @(negedge clk) begin
    longint v;
    cycle++;
    v = shown();
    if (v != prev_value) begin
      chg_cycle.push_back(cycle);
      chg_value.push_back(v);
      prev_value = v;
    end
    if (buz_m !== ~buz_p) minus_errors++;
    if (buz_p && !prev_p) begin
      if (v == 0) tone_edges++;
      else tone_edges_outside++;
    end
    prev_p = buz_p;
  end

  task automatic wait_steps(real n);
    repeat (longint'(n * STEP)) @(negedge clk);
  endtask

  // Checks a countdown from preset*10 recorded in the change queues, from
  // index first on: values, step spacing and the reload.
  task automatic check_countdown(int first, int preset);
    longint exp_v = preset * 10;
    expect_val("count starts at preset", chg_value[first], exp_v);
    for (int k = 1; k <= preset * 10; k++) begin
      expect_val("countdown value", chg_value[first + k], exp_v - k);
      if (k > 1) expect_val("step spacing", chg_cycle[first + k] - chg_cycle[first + k - 1], STEP);
      if ((exp_v - k) % 10 == 9) n_borrow++;
    end
    expect_val("reload value", chg_value[first + preset * 10 + 1], exp_v);
    expect_val("00 held for reload time",
               chg_cycle[first + preset * 10 + 1] - chg_cycle[first + preset * 10], 18 * STEP);
    if (chg_value[first + preset * 10 + 1] == exp_v) n_reload++;
  endtask

  initial begin
    int first;
    // a real falling edge on the asynchronous reset: the state machine's
    // clock does not run while the prescaler is held in reset
    #1 rst_n = 0;
    repeat (10) @(negedge clk);
    expect_val("reset display", shown(), 70);
    expect_val("buzzer plus idle", buz_p, 0);
    expect_val("buzzer minus idle", buz_m, 1);
    if (shown() == 70) n_reset++;
    rst_n = 1;
    wait_steps(2);
    expect_val("idle after reset", shown(), 70);

    // set mode
    set_n = 0; sw_n = ~3'd1;
    wait_steps(2.5);
    expect_val("set mode value", shown(), 10);
    if (shown() == 10) n_set++;
    set_n = 1;
    wait_steps(1.5);
    sw_n = ~3'd6;
    wait_steps(3);
    expect_val("switches ignored outside set mode", shown(), 10);
    if (shown() == 10) n_ignore++;

    // countdown from 10
    first = chg_value.size() - 1;
    start_n = 0;
    wait_steps(2);
    start_n = 1;
    n_start++;
    wait_steps(10 + 18 + 3);
    expect_val("changes in first run", chg_value.size() - first, 10 + 2);
    if (chg_value.size() - first == 12) check_countdown(first, 1);
    expect_val("tone edges during finish", tone_edges, 48);
    expect_val("no tone outside finish", tone_edges_outside, 0);
    if (tone_edges == 48) n_tone++;

    // reset, then the full countdown from 70
    rst_n = 0;
    repeat (5) @(negedge clk);
    expect_val("second reset display", shown(), 70);
    if (shown() == 70) n_reset++;
    rst_n = 1;
    wait_steps(2);
    tone_edges = 0;
    first = chg_value.size() - 1;
    start_n = 0;
    wait_steps(2);
    start_n = 1;
    n_start++;
    wait_steps(70 + 18 + 3);
    expect_val("changes in second run", chg_value.size() - first, 70 + 2);
    if (chg_value.size() - first == 72) check_countdown(first, 7);
    expect_val("tone edges in second finish", tone_edges, 48);
    expect_val("buzzer minus always complement", minus_errors, 0);

    $display("mechanisms: set=%0d ignore=%0d start=%0d borrow=%0d tone=%0d reload=%0d reset=%0d",
             n_set, n_ignore, n_start, n_borrow, n_tone, n_reload, n_reset);
    expect_val("set mode seen", n_set > 0, 1);
    expect_val("ignored switches seen", n_ignore > 0, 1);
    expect_val("start seen", n_start > 0, 1);
    expect_val("borrow seen", n_borrow > 0, 1);
    expect_val("finish tone seen", n_tone > 0, 1);
    expect_val("reload seen", n_reload > 0, 1);
    expect_val("reset seen", n_reset > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
