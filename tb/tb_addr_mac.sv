// tb_addr_mac: exhaustive check of k = 16*i + j for every column i = 0..35
// and row j = 0..15 of the largest (576-bit) block.
module tb_addr_mac;
  logic [5:0] col;
  logic [3:0] row;
  logic [9:0] addr;
  int checks = 0, failures = 0;

  addr_mac #(.D(16), .COL_W(6), .ROW_W(4), .ADDR_W(10)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 36; i++) begin
      for (int j = 0; j < 16; j++) begin
        col = 6'(i);
        row = 4'(j);
        #1;
        checks++;
        if (int'(addr) != 16 * i + j) begin
          failures++;
          $display("FAIL i=%0d j=%0d got %0d", i, j, addr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
