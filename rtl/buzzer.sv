// Differential buzzer driver.
//
// While enable is high the piezo buzzer's two terminals are driven in
// antiphase with the tone clock (plus = clk_drive, minus = its inverse),
// doubling the voltage swing across the buzzer. While enable is low the
// plus terminal rests low and the minus terminal high. Purely
// combinational: out_minus is always the complement of out_plus.
// Behaviour as in the reference design.
module buzzer (
  input  logic clk_drive,
  input  logic enable,
  output logic out_plus,
  output logic out_minus
);

  always_comb begin
    out_plus  = enable & clk_drive;
    out_minus = ~out_plus;
  end

endmodule
