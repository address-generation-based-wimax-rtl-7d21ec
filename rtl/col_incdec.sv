// col_incdec: the incrementer and decrementer shared by the 16-QAM and
// 64-QAM column rules.
//
// Forms inc = i + step and dec = i - step with step 1 or 2, chosen by
// `step2`. Only one of the two results is used for any bit; for the rules
// it serves, the chosen result always lies in 0 .. ncols-1, so the
// unused one may wrap around freely. Combinational.
module col_incdec #(
  parameter int unsigned COL_W = 6
) (
  input  logic [COL_W-1:0] col,
  input  logic             step2,
  output logic [COL_W-1:0] inc,
  output logic [COL_W-1:0] dec
);

  logic [COL_W-1:0] step;
  assign step = step2 ? COL_W'(2) : COL_W'(1);
  assign inc  = col + step;
  assign dec  = col - step;

endmodule
