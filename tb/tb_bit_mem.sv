// tb_bit_mem: fills a 576 x 4-bit memory with random data in a random address
// order, then reads every word back while overwriting others, checking the
// one-cycle read latency, that a word is held when re is low, and that a
// write does not disturb the word read in the same cycle.
module tb_bit_mem;
  localparam int unsigned DEPTH = 576, DW = 4, AW = 10;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;
  int order [DEPTH];

  bit_mem #(.DEPTH(DEPTH), .DW(DW), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) order[a] = a;
    order.shuffle();
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(order[a]); wdata = DW'($urandom);
      model[order[a]] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      logic [DW-1:0] exp;
      re = 1; raddr = AW'(a);
      exp = model[a];
      // write a different word at the same time
      we = 1; waddr = AW'((a + 7) % DEPTH); wdata = DW'($urandom);
      if ((a + 7) % DEPTH > a) model[(a + 7) % DEPTH] = wdata;
      else we = 0;
      @(negedge clk);
      re = 0; we = 0;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL addr %0d got %h expected %h", a, rdata, exp);
      end
      // rdata must hold while re is low, whatever the read address
      raddr = AW'((a + 1) % DEPTH);
      @(negedge clk);
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL hold addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
