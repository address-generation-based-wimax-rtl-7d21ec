// tb_col_incdec: exhaustive check of the shared incrementer/decrementer for
// every 6-bit column value and both step sizes, modulo 64.
module tb_col_incdec;
  localparam int unsigned COL_W = 6;
  logic [COL_W-1:0] col, inc, dec;
  logic step2;
  int checks = 0, failures = 0;

  col_incdec #(.COL_W(COL_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++) begin
      for (int s = 0; s < 2; s++) begin
        col = COL_W'(c);
        step2 = s[0];
        #1;
        checks += 2;
        if (int'(inc) != (c + s + 1) % 64) begin
          failures++;
          $display("FAIL inc col=%0d step2=%0d got %0d", c, s, inc);
        end
        if (int'(dec) != (c - s - 1 + 64) % 64) begin
          failures++;
          $display("FAIL dec col=%0d step2=%0d got %0d", c, s, dec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
