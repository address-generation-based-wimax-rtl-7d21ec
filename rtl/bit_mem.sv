// bit_mem: one memory block of the block (de)interleaver (M-1 or M-2).
//
// A simple dual-port RAM of DEPTH words of DW bits: one write port with
// write enable `we`, one read port with read enable `re`. The read is
// synchronous (rdata is valid the clock edge after re), which maps onto FPGA
// block RAM. DEPTH defaults to the largest interleaver depth, 576 bits, and
// DW to one hard bit per word; DW can be raised to hold soft bits. The
// memory itself is not initialised: a block is always written in full
// before it is read.
module bit_mem #(
  parameter int unsigned DEPTH  = deint_pkg::NCBPS_MAX,
  parameter int unsigned DW     = 1,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DW-1:0]     wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DW-1:0]     rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

  assert property (@(posedge clk) we |-> waddr < ADDR_W'(DEPTH));
  assert property (@(posedge clk) re |-> raddr < ADDR_W'(DEPTH));

endmodule
