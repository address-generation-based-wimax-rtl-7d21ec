// tb_bank_ctrl: drives the ping-pong controller with blocks of writes (with
// random gaps, and gap-free) and checks, cycle by cycle, that
//   - writes go to M-1 while sel = 1 and to M-2 while sel = 0,
//   - sel flips after the last write of every block,
//   - the memory just filled is then read at addresses 0..Ncbps-1, one per
//     clock, starting the cycle after the last write, and never the memory
//     being written,
//   - a start in the middle of a read abandons it and sets sel = 1.
module tb_bank_ctrl;
  localparam int unsigned NMAX = 576, AW = 10, NW = 10;
  logic clk = 0, rst_n = 0, start = 0, wr_valid = 0, wr_last = 0;
  logic [NW-1:0] ncbps = '0;
  logic sel, we1, we2, re, rd_bank, rd_last;
  logic [AW-1:0] raddr;
  int checks = 0, failures = 0;

  // expected state
  bit m_sel = 1, m_re = 0, m_bank = 0;
  int m_raddr = 0, n = 0;
  int swaps10 = 0, swaps01 = 0, reads_done = 0, aborts = 0;

  bank_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: sel=%b re=%b raddr=%0d bank=%b", what, $time, sel, re, raddr, rd_bank);
    end
  endtask

  // compare outputs with the expected state, then advance the expectation
  task automatic step();
    #1;
    check(sel == m_sel, "sel");
    check(we1 == (wr_valid && m_sel) && we2 == (wr_valid && !m_sel), "write steering");
    check(re == m_re, "re");
    if (m_re) begin
      check(int'(raddr) == m_raddr, "raddr");
      check(rd_bank == m_bank, "rd_bank");
      check(rd_bank != sel, "read bank is not written");
      check(rd_last == (m_raddr == n - 1), "rd_last");
    end
    @(posedge clk);
    if (start) begin
      if (m_re) aborts++;
      m_sel = 1; m_re = 0; m_raddr = 0;
    end else if (wr_valid && wr_last) begin
      if (m_sel) swaps10++; else swaps01++;
      m_bank = m_sel; m_sel = !m_sel; m_re = 1; m_raddr = 0;
    end else if (m_re) begin
      if (m_raddr == n - 1) begin m_re = 0; m_raddr = 0; reads_done++; end
      else m_raddr++;
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int sizes [8] = '{96, 144, 192, 288, 384, 432, 480, 576};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 8; cfg++) begin
      n = sizes[cfg];
      ncbps = NW'(n);
      start = 1;
      step();
      start = 0;
      for (int blk = 0; blk < 4; blk++) begin
        bit gaps;
        gaps = (blk % 2 == 1);
        for (int w = 0; w < n; w++) begin
          while (gaps && $urandom_range(3) == 0) begin
            wr_valid = 0; wr_last = 0;
            step();
          end
          wr_valid = 1; wr_last = (w == n - 1);
          step();
        end
        wr_valid = 0; wr_last = 0;
      end
      // half of the way through the last read, restart
      repeat (n / 2) step();
      check(m_re, "read still running before restart");
    end
    repeat (600) step();
    check(swaps10 > 0 && swaps01 > 0, "both swap directions");
    check(reads_done > 0, "complete reads");
    check(aborts > 0, "aborted reads");
    $display("swaps 1->0 %0d, 0->1 %0d, reads %0d, aborts %0d", swaps10, swaps01, reads_done, aborts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
