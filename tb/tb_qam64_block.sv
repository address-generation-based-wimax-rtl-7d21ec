// tb_qam64_block: for every column i of a 36-column matrix and every row j,
// applies the block's choice to i and compares the result with the column
// given by the standard's 64-QAM deinterleaver permutation,
// i' = 3*floor(i/3) + (i + j) mod 3.
module tb_qam64_block;
  import deint_pkg::*;
  logic [1:0] row_mod3, col_mod3;
  col_ctl_t ctl;
  int checks = 0, failures = 0;

  qam64_block dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 16; j++) begin
      for (int i = 0; i < 36; i++) begin
        int got, exp;
        row_mod3 = 2'(j % 3);
        col_mod3 = 2'(i % 3);
        #1;
        exp = 3 * (i / 3) + (i + j) % 3;
        case (ctl.op)
          COL_INC: got = i + (ctl.step2 ? 2 : 1);
          COL_DEC: got = i - (ctl.step2 ? 2 : 1);
          default: got = i;
        endcase
        checks++;
        if (got != exp) begin
          failures++;
          $display("FAIL i=%0d j=%0d got %0d expected %0d", i, j, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
