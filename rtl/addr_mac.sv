// addr_mac: the multiplier and adder shared by all modulations.
//
// Forms the deinterleaver address k = D*col + row from the adjusted column
// index i' and the row index j. D is a parameter (16 for IEEE 802.16e); the
// product is written as a multiplication so a synthesis tool may map it to
// an embedded multiplier or, since D is a constant power of two, to a shift.
// Combinational.
module addr_mac #(
  parameter int unsigned D      = deint_pkg::D,
  parameter int unsigned COL_W  = 6,
  parameter int unsigned ROW_W  = $clog2(D),
  parameter int unsigned ADDR_W = 10
) (
  input  logic [COL_W-1:0]  col,
  input  logic [ROW_W-1:0]  row,
  output logic [ADDR_W-1:0] addr
);

  assign addr = ADDR_W'(col) * ADDR_W'(D) + ADDR_W'(row);

endmodule
