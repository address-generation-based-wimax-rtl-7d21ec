// tb_column_counter: checks the column counter against a plain integer model.
// Random column counts (1..36) and a random enable pattern; after every clock
// the count, its residue mod 3 and the wrap flag must match the model, and
// a clear must bring it back to 0.
module tb_column_counter;
  localparam int unsigned COL_W = 6;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [COL_W-1:0] ncols = 6'd6, col;
  logic [1:0] col_mod3;
  logic wrap;
  int checks = 0, failures = 0;
  int model = 0, wraps = 0;

  column_counter #(.COL_W(COL_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: col=%0d mod3=%0d model=%0d", what, col, col_mod3, model);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      ncols = COL_W'(1 + $urandom_range(35));
      clear = 1; en = 0;
      @(negedge clk);
      clear = 0;
      model = 0;
      check(col == 0, "clear");
      for (int c = 0; c < 300; c++) begin
        en = ($urandom_range(3) != 0);
        #1;
        check(wrap == (en && model == int'(ncols) - 1), "wrap");
        @(negedge clk);
        if (en) model = (model == int'(ncols) - 1) ? 0 : model + 1;
        if (en && model == 0) wraps++;
        check(int'(col) == model, "count");
        check(int'(col_mod3) == model % 3, "mod3");
      end
    end
    // clear wins over enable
    en = 1; clear = 1;
    @(negedge clk);
    check(col == 0 && col_mod3 == 0, "clear over en");
    check(wraps > 40, "wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
