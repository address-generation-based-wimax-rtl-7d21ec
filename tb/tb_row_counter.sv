// tb_row_counter: checks the 16-row counter against an integer model under a
// random enable pattern: the count, its residue mod 3, the wrap flag at row
// 15 and the synchronous clear.
module tb_row_counter;
  localparam int unsigned D = 16;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [3:0] row;
  logic [1:0] row_mod3;
  logic wrap;
  int checks = 0, failures = 0;
  int model = 0, wraps = 0;

  row_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: row=%0d mod3=%0d model=%0d", what, row, row_mod3, model);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(row == 0, "reset");
    for (int c = 0; c < 2000; c++) begin
      en = ($urandom_range(2) != 0);
      clear = ($urandom_range(199) == 0);
      #1;
      check(wrap == (en && model == D - 1), "wrap");
      @(negedge clk);
      if (clear) model = 0;
      else if (en) begin
        if (model == D - 1) wraps++;
        model = (model == D - 1) ? 0 : model + 1;
      end
      check(int'(row) == model, "count");
      check(int'(row_mod3) == model % 3, "mod3");
    end
    check(wraps > 5, "wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
