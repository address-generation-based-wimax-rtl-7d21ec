// qam64_block: column rule of the 64-QAM deinterleaver (s = 3).
//
// Columns are taken in groups of three. With r = i mod 3 and q = j mod 3,
// the address of the bit in row j, column i is k = 16*i' + j with
//   q = 0:            i' = i
//   q = 1, r != 2:    i' = i + 1        q = 1, r = 2:   i' = i - 2
//   q = 2, r  = 0:    i' = i + 2        q = 2, r != 0:  i' = i - 1
// i.e. each group of three columns is rotated by q places in row j. This
// block only chooses the operation and step; the shared incrementer/
// decrementer and multiplier/adder do the arithmetic. Combinational.
module qam64_block
  import deint_pkg::*;
(
  input  logic [1:0] row_mod3,  // j mod 3 (0..2)
  input  logic [1:0] col_mod3,  // i mod 3 (0..2)
  output col_ctl_t   ctl
);

  always_comb begin
    ctl = COL_CTL_KEEP;
    unique case (row_mod3)
      2'd1: begin
        if (col_mod3 == 2'd2) ctl = '{op: COL_DEC, step2: 1'b1};
        else                  ctl = '{op: COL_INC, step2: 1'b0};
      end
      2'd2: begin
        if (col_mod3 == 2'd0) ctl = '{op: COL_INC, step2: 1'b1};
        else                  ctl = '{op: COL_DEC, step2: 1'b0};
      end
      default: ctl = COL_CTL_KEEP;
    endcase
  end

endmodule
