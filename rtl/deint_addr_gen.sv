// deint_addr_gen: floor-free address generator of the IEEE 802.16e channel
// deinterleaver, for QPSK, 16-QAM and 64-QAM and every interleaver depth
// Ncbps that is a multiple of 16*s up to NCBPS_MAX.
//
// The standard defines the deinterleaver by two permutations that contain
// floor operations. Writing the received bit index as n = j*(Ncbps/16) + i
// (row j = 0..15, column i = 0..Ncbps/16-1) they reduce to k = 16*i' + j,
// where i' is i moved by 0, 1 or 2 columns as chosen by (i, j) mod s. So the
// hardware is only:
//   - a column counter (i, i mod 3) and a row counter (j, j mod 3),
//   - the QPSK rule (i' = i), the 16-QAM block and the 64-QAM block, which
//     pick an operation (keep / +step / -step) and a step of 1 or 2,
//   - one shared incrementer/decrementer, one shared multiplier and adder.
// This structure follows the published architecture. The handshake, the
// output register and the way the configuration is loaded are this design's.
//
// Interface: `start` (one cycle) loads `mod` and `ncbps` and restarts at
// bit 0 of a block; `en` is ignored in that cycle. Each cycle with `en`
// produces the address of the next received bit. Blocks follow each other
// without a gap: after the last bit of a block the counters start again.
//
// Timing: one address per clock. addr/addr_valid/addr_last are registered and
// appear the clock edge after the `en` they belong to (latency 1).
module deint_addr_gen
  import deint_pkg::mod_e, deint_pkg::MOD_QPSK, deint_pkg::MOD_QAM16, deint_pkg::MOD_QAM64,
         deint_pkg::col_ctl_t, deint_pkg::COL_CTL_KEEP, deint_pkg::COL_INC, deint_pkg::COL_DEC;
#(
  parameter int unsigned D         = deint_pkg::D,
  parameter int unsigned NCBPS_MAX = deint_pkg::NCBPS_MAX,
  parameter int unsigned ADDR_W    = $clog2(NCBPS_MAX),
  parameter int unsigned NCBPS_W   = $clog2(NCBPS_MAX + 1),
  parameter int unsigned COL_W     = $clog2(NCBPS_MAX / D + 1),
  parameter int unsigned ROW_W     = $clog2(D)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  mod_e               mod,
  input  logic [NCBPS_W-1:0] ncbps,
  input  logic               en,
  output logic [ADDR_W-1:0]  addr,
  output logic               addr_valid,
  output logic               addr_last
);

  // Configuration, held from one `start` to the next.
  mod_e             mod_q;
  logic [COL_W-1:0] ncols_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mod_q   <= MOD_QPSK;
      ncols_q <= COL_W'(NCBPS_MAX / D);
    end else if (start) begin
      mod_q   <= mod;
      ncols_q <= COL_W'(ncbps / NCBPS_W'(D));   // D is a power of two: a shift
    end
  end

  logic step;
  assign step = en && !start;

  // Row and column counters.
  logic [COL_W-1:0] col;
  logic [1:0]       col_mod3;
  logic             col_wrap;
  logic [ROW_W-1:0] row;
  logic [1:0]       row_mod3;
  logic             row_wrap;

  column_counter #(.COL_W(COL_W)) u_col (
    .clk, .rst_n, .clear(start), .en(step), .ncols(ncols_q),
    .col, .col_mod3, .wrap(col_wrap)
  );

  row_counter #(.D(D), .ROW_W(ROW_W)) u_row (
    .clk, .rst_n, .clear(start), .en(col_wrap),
    .row, .row_mod3, .wrap(row_wrap)
  );

  // Modulation-specific column rules.
  col_ctl_t ctl16, ctl64, ctl;

  qam16_block u_qam16 (.row_odd(row[0]), .col_odd(col[0]), .ctl(ctl16));
  qam64_block u_qam64 (.row_mod3, .col_mod3, .ctl(ctl64));

  always_comb begin
    unique case (mod_q)
      MOD_QAM16: ctl = ctl16;
      MOD_QAM64: ctl = ctl64;
      default:   ctl = COL_CTL_KEEP;    // QPSK: i' = i
    endcase
  end

  // Shared incrementer/decrementer and column selection.
  logic [COL_W-1:0] col_inc, col_dec, col_adj;

  col_incdec #(.COL_W(COL_W)) u_incdec (
    .col, .step2(ctl.step2), .inc(col_inc), .dec(col_dec)
  );

  always_comb begin
    unique case (ctl.op)
      COL_INC: col_adj = col_inc;
      COL_DEC: col_adj = col_dec;
      default: col_adj = col;
    endcase
  end

  // Shared multiplier and adder: k = D*i' + j.
  logic [ADDR_W-1:0] addr_d;

  addr_mac #(.D(D), .COL_W(COL_W), .ROW_W(ROW_W), .ADDR_W(ADDR_W)) u_mac (
    .col(col_adj), .row, .addr(addr_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr       <= '0;
      addr_valid <= 1'b0;
      addr_last  <= 1'b0;
    end else begin
      addr_valid <= step;
      addr_last  <= step && row_wrap;
      if (step) addr <= addr_d;
    end
  end

  // D must be a power of two; a new block size must be a whole number of
  // columns, each column a whole number of bit groups, and must fit.
  initial assert ((D & (D - 1)) == 0 && D >= 2);

  assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (ncbps != '0) && (ncbps <= NCBPS_W'(NCBPS_MAX)) && (ncbps % NCBPS_W'(D) == '0));
  assert property (@(posedge clk) disable iff (!rst_n)
    start && mod == MOD_QAM16 |-> (ncbps / NCBPS_W'(D)) % 2 == 0);
  assert property (@(posedge clk) disable iff (!rst_n)
    start && mod == MOD_QAM64 |-> (ncbps / NCBPS_W'(D)) % 3 == 0);
  assert property (@(posedge clk) disable iff (!rst_n) step |-> addr_d < ADDR_W'(ncols_q) * ADDR_W'(D));

endmodule
