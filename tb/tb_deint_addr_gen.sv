// tb_deint_addr_gen: checks the floor-free address generator against the
// IEEE 802.16e deinterleaver permutations written with floor functions,
//   m = s*floor(n/s) + (n + floor(d*n/N)) mod s
//   k = d*m - (N-1)*floor(d*m/N),
// for every modulation and interleaver depth of the standard, with a
// gap-free enable and with random gaps, over two consecutive blocks each.
// It also checks the sample address tables (first four rows, five columns)
// for QPSK/96, 16-QAM/192 and 64-QAM/576, that each block's addresses form a
// permutation, that addr_last marks the last bit, and the latency of one
// clock with one address per clock.
module tb_deint_addr_gen;
  import deint_pkg::*;
  localparam int unsigned DD = 16;
  logic clk = 0, rst_n = 0, start = 0, en = 0;
  mod_e mod = MOD_QPSK;
  logic [9:0] ncbps = '0;
  logic [9:0] addr;
  logic addr_valid, addr_last;
  int checks = 0, failures = 0;

  deint_addr_gen dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_addr(int n, int nc, int s);
    int m;
    m = s * (n / s) + (n + (DD * n) / nc) % s;
    return DD * m - (nc - 1) * ((DD * m) / nc);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // sample tables: rows j = 0..3, columns i = 0..4
  int tab96  [4][5] = '{'{0,16,32,48,64}, '{1,17,33,49,65}, '{2,18,34,50,66}, '{3,19,35,51,67}};
  int tab192 [4][5] = '{'{0,16,32,48,64}, '{17,1,49,33,81}, '{2,18,34,50,66}, '{19,3,51,35,83}};
  int tab576 [4][5] = '{'{0,16,32,48,64}, '{17,33,1,65,81}, '{34,2,18,82,50}, '{3,19,35,51,67}};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    typedef struct { mod_e m; int s; int n; } cfg_t;
    static cfg_t cfgs [16] = '{
      '{MOD_QPSK, 1, 96}, '{MOD_QPSK, 1, 144}, '{MOD_QPSK, 1, 192}, '{MOD_QPSK, 1, 288},
      '{MOD_QPSK, 1, 384}, '{MOD_QPSK, 1, 432}, '{MOD_QPSK, 1, 480}, '{MOD_QPSK, 1, 576},
      '{MOD_QAM16, 2, 192}, '{MOD_QAM16, 2, 288}, '{MOD_QAM16, 2, 384}, '{MOD_QAM16, 2, 576},
      '{MOD_QAM64, 3, 288}, '{MOD_QAM64, 3, 384}, '{MOD_QAM64, 3, 432}, '{MOD_QAM64, 3, 576}};
    int got [576];
    bit seen [576];
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (cfgs[c]) begin
      for (int pass = 0; pass < 2; pass++) begin
        int nc, s, n_in, n_out, t_en;
        bit gaps;
        nc = cfgs[c].n; s = cfgs[c].s;
        gaps = (pass == 1);
        mod = cfgs[c].m; ncbps = 10'(nc);
        start = 1; en = 1;          // en is ignored while start is high
        @(negedge clk);
        start = 0; en = 0;
        check(addr_valid == 0, "no address during start");
        n_in = 0; n_out = 0; t_en = 0;
        for (int k = 0; k < nc; k++) seen[k] = 0;
        // two blocks back to back
        while (n_out < 2 * nc) begin
          en = (n_in < 2 * nc) && !(gaps && $urandom_range(2) == 0);
          @(posedge clk);
          #1;
          // the address of an enable sampled at this edge is out right after it
          check(addr_valid == en, "one clock latency");
          if (addr_valid) begin
            int n, exp;
            n = n_out % nc;
            exp = ref_addr(n, nc, s);
            check(int'(addr) == exp, $sformatf("addr mod=%0d N=%0d n=%0d got %0d exp %0d", s, nc, n, addr, exp));
            check(addr_last == (n == nc - 1), "addr_last");
            if (n_out < nc) begin
              got[n] = int'(addr);
              check(!seen[addr], "address repeats");
              seen[addr] = 1;
            end
            n_out++;
          end
          if (en) n_in++;
          if (!gaps) t_en++;
          @(negedge clk);
        end
        en = 0;
        if (!gaps) begin
          check(t_en == 2 * nc, $sformatf("throughput: %0d cycles for %0d addresses", t_en, 2 * nc));
        end
        // sample tables: row j, column i is bit n = j*(N/16) + i
        for (int j = 0; j < 4; j++)
          for (int i = 0; i < 5; i++) begin
            int n;
            n = j * (nc / DD) + i;
            if (s == 1 && nc == 96)  check(got[n] == tab96[j][i],  "table QPSK 96");
            if (s == 2 && nc == 192) check(got[n] == tab192[j][i], "table 16-QAM 192");
            if (s == 3 && nc == 576) check(got[n] == tab576[j][i], "table 64-QAM 576");
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
