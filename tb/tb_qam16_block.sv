// tb_qam16_block: for every column i of a 36-column matrix and every row j,
// applies the block's choice to i and compares the result with the column
// given by the standard's 16-QAM deinterleaver permutation,
// i' = 2*floor(i/2) + (i + j) mod 2.
module tb_qam16_block;
  import deint_pkg::*;
  logic row_odd, col_odd;
  col_ctl_t ctl;
  int checks = 0, failures = 0;

  qam16_block dut (.*);

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
        row_odd = j[0];
        col_odd = i[0];
        #1;
        exp = 2 * (i / 2) + (i + j) % 2;
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
