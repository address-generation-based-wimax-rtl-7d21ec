// row_counter: row index j of the deinterleaver matrix.
//
// Counts j = 0 .. D-1 (D = 16 rows) once per column-counter wrap, i.e. on
// every cycle with `en`, and wraps to 0. It keeps j mod 3 beside j so that
// the 64-QAM rule needs no divider; j mod 2 is bit 0 of j. `wrap` is high,
// combinationally, when en is high and j is at D-1: together with the
// column counter's wrap it marks the last bit of a block. `clear` restarts
// at 0 and wins over `en`. The row count D follows the standard; the mod-3
// side counter and the synchronous clear are this design's choices.
module row_counter #(
  parameter int unsigned D     = deint_pkg::D,
  parameter int unsigned ROW_W = $clog2(D)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  output logic [ROW_W-1:0] row,
  output logic [1:0]       row_mod3,
  output logic             wrap
);

  logic at_last;
  assign at_last = (row == ROW_W'(D - 1));
  assign wrap    = en && at_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row      <= '0;
      row_mod3 <= '0;
    end else if (clear) begin
      row      <= '0;
      row_mod3 <= '0;
    end else if (en) begin
      if (at_last) begin
        row      <= '0;
        row_mod3 <= '0;
      end else begin
        row      <= row + ROW_W'(1);
        row_mod3 <= (row_mod3 == 2'd2) ? 2'd0 : row_mod3 + 2'd1;
      end
    end
  end

endmodule
