// Self-checking testbench for prescaler.
//
// Runs two instances, a small one (DIV_FACTOR_BUZ = 10, DIV_FACTOR_SM = 40)
// and one with the default factors (50,000 and 250,000), from one 50 MHz
// clock. For each, a cycle counter started at reset release predicts every
// output toggle: clk_out1 toggles on cycles that are multiples of
// DIV_FACTOR_BUZ/2 + 1, clk_out2 on multiples of
// (DIV_FACTOR_BUZ/2 + 1) * (DIV_FACTOR_SM/DIV_FACTOR_BUZ + 1). Every cycle
// both outputs are compared with that prediction. The default instance is
// followed through two full periods of clk_out2.
module tb_prescaler;
  localparam int unsigned S_BUZ = 10, S_SM = 40;
  localparam int unsigned D_BUZ = 50000, D_SM = 250000;
  localparam longint S_H1 = S_BUZ / 2 + 1, S_H2 = S_H1 * (S_SM / S_BUZ + 1);
  localparam longint D_H1 = D_BUZ / 2 + 1, D_H2 = D_H1 * (D_SM / D_BUZ + 1);

  logic clk = 0, rst_n = 0;
  logic s_out1, s_out2, d_out1, d_out2;
  int   checks = 0, failures = 0;
  longint cycle = 0;
  int   s_t1 = 0, s_t2 = 0, d_t1 = 0, d_t2 = 0;   // observed toggles

  prescaler #(.DIV_FACTOR_SM(S_SM), .DIV_FACTOR_BUZ(S_BUZ)) dut_small (
    .clk(clk), .rst_n(rst_n), .clk_out1(s_out1), .clk_out2(s_out2));
  prescaler dut_default (
    .clk(clk), .rst_n(rst_n), .clk_out1(d_out1), .clk_out2(d_out2));

  always #10 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d: got %b expected %b", what, cycle, got, exp);
    end
  endtask

  logic ps1 = 0, ps2 = 0, pd1 = 0, pd2 = 0;

  initial begin
    repeat (3) @(negedge clk);
    cmp("reset s_out1", s_out1, 0); cmp("reset s_out2", s_out2, 0);
    cmp("reset d_out1", d_out1, 0); cmp("reset d_out2", d_out2, 0);
    rst_n = 1;
    while (cycle < 2 * 2 * longint'(D_H2) + 5) begin
      @(posedge clk);
      cycle++;
      @(negedge clk);
      cmp("s_out1", s_out1, logic'((cycle / S_H1) % 2));
      cmp("s_out2", s_out2, logic'((cycle / S_H2) % 2));
      cmp("d_out1", d_out1, logic'((cycle / D_H1) % 2));
      cmp("d_out2", d_out2, logic'((cycle / D_H2) % 2));
      if (s_out1 != ps1) s_t1++;
      if (s_out2 != ps2) s_t2++;
      if (d_out1 != pd1) d_t1++;
      if (d_out2 != pd2) d_t2++;
      ps1 = s_out1; ps2 = s_out2; pd1 = d_out1; pd2 = d_out2;
    end
    // rate check: toggles seen over the whole run
    checks++;
    if (d_t2 != 4 || d_t1 != int'(cycle / D_H1) || s_t2 != int'(cycle / S_H2)) begin
      failures++;
      $display("FAIL toggle counts: d1=%0d d2=%0d s1=%0d s2=%0d", d_t1, d_t2, s_t1, s_t2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
