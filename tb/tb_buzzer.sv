// Self-checking testbench for buzzer.
//
// Tries every combination of tone clock and enable and checks the two
// terminals: antiphase copies of the clock when enabled, plus low and
// minus high when disabled. Then toggles the clock for a while with the
// enable on and off and checks that the plus terminal follows it only
// while enabled.
module tb_buzzer;
  logic clk_drive, enable, out_plus, out_minus;
  int   checks = 0, failures = 0;
  int   plus_edges;

  buzzer dut (.clk_drive(clk_drive), .enable(enable),
              .out_plus(out_plus), .out_minus(out_minus));

  task automatic check(logic exp_plus, logic exp_minus);
    checks++;
    if (out_plus !== exp_plus || out_minus !== exp_minus) begin
      failures++;
      $display("FAIL clk=%b en=%b: plus=%b minus=%b expected %b %b",
               clk_drive, enable, out_plus, out_minus, exp_plus, exp_minus);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; clk_drive = 0; #5; check(0, 1);
    clk_drive = 1;             #5; check(0, 1);
    enable = 1; clk_drive = 0; #5; check(0, 1);
    clk_drive = 1;             #5; check(1, 0);

    for (int en = 0; en < 2; en++) begin
      enable = en[0];
      plus_edges = 0;
      for (int i = 0; i < 20; i++) begin
        logic prev;
        prev = out_plus;
        clk_drive = ~clk_drive; #5;
        if (!prev && out_plus) plus_edges++;
      end
      checks++;
      if (plus_edges != ((en != 0) ? 10 : 0)) begin
        failures++;
        $display("FAIL enable=%0d: %0d rising edges on plus", en, plus_edges);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
