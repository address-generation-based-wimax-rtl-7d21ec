// qam16_block: column rule of the 16-QAM deinterleaver (s = 2).
//
// For 16-QAM, the address of the bit in row j, column i is
//   k = 16*i + j        when j is even,
//   k = 16*(i+1) + j    when j is odd and i is even,
//   k = 16*(i-1) + j    when j is odd and i is odd,
// i.e. in odd rows neighbouring column pairs are swapped. This block only
// decides which of the three applies; the shared incrementer/decrementer and
// multiplier/adder outside do the arithmetic. Purely combinational.
module qam16_block
  import deint_pkg::*;
(
  input  logic     row_odd,   // j mod 2
  input  logic     col_odd,   // i mod 2
  output col_ctl_t ctl
);

  always_comb begin
    ctl = COL_CTL_KEEP;
    if (row_odd) begin
      ctl.op    = col_odd ? COL_DEC : COL_INC;
      ctl.step2 = 1'b0;
    end
  end

endmodule
