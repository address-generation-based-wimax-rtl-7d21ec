// tb_wimax_deinterleaver: end-to-end test of the deinterleaver at its default
// parameters (blocks of up to 576 bits, 1-bit data).
//
// Random source bits are interleaved with the IEEE 802.16e transmit
// permutations (written with floor functions, independently of the design),
//   m = (N/d)*(k mod d) + floor(k/d)
//   j = s*floor(m/s) + (m + N - floor(d*m/N)) mod s,
// and the interleaved stream is fed to the deinterleaver, which must return
// the source bits in their original order. Every modulation and interleaver
// depth of the standard is run, three blocks each, once gap-free and once
// with random gaps in the input. The test also checks out_last, that the
// first bit of each block leaves two clocks after its last bit went in, and
// that gap-free input gives gap-free output across block boundaries. It
// counts each mechanism (both memory swaps, input gaps, every modulation,
// seamless block change, restart in the middle of a block) and fails if one
// never happened.
module tb_wimax_deinterleaver;
  import deint_pkg::*;
  localparam int unsigned DD = 16;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  mod_e mod = MOD_QPSK;
  logic [9:0] ncbps = '0;
  logic [0:0] in_data = '0, out_data;
  logic out_valid, out_last, sel;
  int checks = 0, failures = 0;
  int cyc = 0;

  wimax_deinterleaver dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { bit b; bit first; bit last; int due; } exp_t;
  exp_t expq [$];

  // mechanism counters
  int n_mod [3] = '{0, 0, 0};
  int n_swap10 = 0, n_swap01 = 0, n_gap = 0, n_seamless = 0, n_restart = 0, n_blocks = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  initial begin
    bit prev_valid, prev_last, prev_sel;
    prev_valid = 0; prev_last = 0; prev_sel = 1;
    forever begin
      @(posedge clk);
      #1;
      if (rst_n) begin
        if (prev_sel && !sel) n_swap10++;
        if (!prev_sel && sel && !start) n_swap01++;
        prev_sel = sel;
      end
      if (out_valid) begin
        exp_t e;
        if (expq.size() == 0) begin
          check(0, "unexpected output");
        end else begin
          e = expq.pop_front();
          check(out_data[0] == e.b, "data");
          check(out_last == e.last, "out_last");
          if (e.first) begin
            check(cyc == e.due, $sformatf("first bit at cycle %0d, due %0d", cyc, e.due));
            if (prev_valid && prev_last) n_seamless++;
          end
        end
      end
      prev_valid = out_valid;
      prev_last = out_last;
    end
  end

  task automatic send_block(int nc, int s, bit gaps, bit keep);
    bit src [576];
    bit chan [576];
    int mk, jk;
    for (int k = 0; k < nc; k++) begin
      src[k] = 1'($urandom);
      mk = (nc / DD) * (k % DD) + k / DD;
      jk = s * (mk / s) + (mk + nc - (DD * mk) / nc) % s;
      chan[jk] = src[k];
    end
    for (int n = 0; n < nc; n++) begin
      while (gaps && $urandom_range(4) == 0) begin
        in_valid = 0;
        in_data = 1'($urandom);
        n_gap++;
        @(negedge clk);
      end
      in_valid = 1;
      in_data[0] = chan[n];
      if (n == nc - 1 && keep) begin
        // the last bit is taken at the next edge, cyc + 1
        for (int k = 0; k < nc; k++)
          expq.push_back('{b: src[k], first: (k == 0), last: (k == nc - 1), due: cyc + 1 + 2});
        n_blocks++;
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic configure(mod_e m, int nc);
    mod = m; ncbps = 10'(nc);
    start = 1; in_valid = 1;        // in_valid is ignored while start is high
    @(negedge clk);
    start = 0; in_valid = 0;
  endtask

  initial begin
    typedef struct { mod_e m; int s; int n; } cfg_t;
    static cfg_t cfgs [16] = '{
      '{MOD_QPSK, 1, 96}, '{MOD_QPSK, 1, 144}, '{MOD_QPSK, 1, 192}, '{MOD_QPSK, 1, 288},
      '{MOD_QPSK, 1, 384}, '{MOD_QPSK, 1, 432}, '{MOD_QPSK, 1, 480}, '{MOD_QPSK, 1, 576},
      '{MOD_QAM16, 2, 192}, '{MOD_QAM16, 2, 288}, '{MOD_QAM16, 2, 384}, '{MOD_QAM16, 2, 576},
      '{MOD_QAM64, 3, 288}, '{MOD_QAM64, 3, 384}, '{MOD_QAM64, 3, 432}, '{MOD_QAM64, 3, 576}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (cfgs[c]) begin
      for (int pass = 0; pass < 2; pass++) begin
        configure(cfgs[c].m, cfgs[c].n);
        n_mod[cfgs[c].s - 1]++;
        for (int blk = 0; blk < 3; blk++) send_block(cfgs[c].n, cfgs[c].s, pass == 1, 1);
        // let the last block drain
        while (expq.size() != 0) @(negedge clk);
        repeat (3) @(negedge clk);
        // now and then, abandon a block half way with a new start
        if (c % 5 == 2 && pass == 0) begin
          for (int n = 0; n < cfgs[c].n / 2; n++) begin
            in_valid = 1; in_data = 1'($urandom);
            @(negedge clk);
          end
          in_valid = 0;
          n_restart++;
        end
      end
    end
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "all blocks came out");
    check(n_blocks == 96, "block count");
    check(n_mod[0] > 0 && n_mod[1] > 0 && n_mod[2] > 0, "every modulation");
    check(n_swap10 > 0, "swap M-1 to M-2");
    check(n_swap01 > 0, "swap M-2 to M-1");
    check(n_gap > 0, "input gaps");
    check(n_seamless > 0, "seamless block change");
    check(n_restart > 0, "restart mid-block");
    $display("blocks %0d, QPSK/16-QAM/64-QAM configs %0d/%0d/%0d, swaps %0d/%0d, gaps %0d, seamless %0d, restarts %0d",
             n_blocks, n_mod[0], n_mod[1], n_mod[2], n_swap10, n_swap01, n_gap, n_seamless, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
