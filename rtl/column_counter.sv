// column_counter: column index i of the deinterleaver matrix.
//
// Counts i = 0 .. ncols-1 (ncols = Ncbps/16) on every cycle with `en`, and
// wraps to 0. Alongside i it keeps i mod 3 as a second small counter, so the
// 64-QAM column rule needs no divider; i mod 2 is simply bit 0 of i.
// `wrap` is high, combinationally, in the cycle in which en is high and i is
// at its last value: it advances the row counter. `clear` restarts at 0 and
// wins over `en`. The count range follows the standard; the mod-3 side
// counter and the synchronous clear are this design's choices.
//
// Timing: col/col_mod3 are registers and change on the clock edge after en.
module column_counter #(
  parameter int unsigned COL_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [COL_W-1:0] ncols,     // number of columns, at least 1
  output logic [COL_W-1:0] col,
  output logic [1:0]       col_mod3,
  output logic             wrap
);

  logic at_last;
  assign at_last = (col == ncols - COL_W'(1));
  assign wrap    = en && at_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col      <= '0;
      col_mod3 <= '0;
    end else if (clear) begin
      col      <= '0;
      col_mod3 <= '0;
    end else if (en) begin
      if (at_last) begin
        col      <= '0;
        col_mod3 <= '0;
      end else begin
        col      <= col + COL_W'(1);
        col_mod3 <= (col_mod3 == 2'd2) ? 2'd0 : col_mod3 + 2'd1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) col_mod3 != 2'd3);

endmodule
