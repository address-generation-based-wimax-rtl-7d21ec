// wimax_deinterleaver: IEEE 802.16e channel deinterleaver built from the
// floor-free address generator and two ping-pong bit memories.
//
// Received coded bits arrive in channel order, one per clock at most. The
// address generator gives, for the n-th bit of a block, the position k it
// held before interleaving; the bit is written at address k of the memory
// selected by sel. When the block of Ncbps bits is complete the memories
// swap roles: the full one is read out in address order 0..Ncbps-1 (which is
// the deinterleaved order) while the next block is written into the other.
// Supports QPSK, 16-QAM and 64-QAM at every depth Ncbps = 16*c (c a multiple
// of s) up to NCBPS_MAX, i.e. all the depths of the standard.
// The two-memory structure and the address generator follow the published
// design; the streaming handshake, the data width and the pipeline are this
// design's.
//
// Interface:
//   start, mod, ncbps   one-cycle pulse that loads a new configuration and
//                       flushes any block in progress (in_valid is ignored
//                       in that cycle);
//   in_valid, in_data   one received bit (or DW-bit soft value) per cycle;
//                       gaps are allowed;
//   out_valid, out_data deinterleaved bits, in order, one per clock for a
//                       whole block; out_last marks the last bit of a block;
//   sel                 1 while M-1 is written and M-2 read, 0 otherwise.
// Timing: the first output bit of a block is valid two clock edges after the
// edge that takes its last input bit (address register, then the memory's
// read register); the block then leaves at one bit per clock, so a gap-free
// input stream gives a gap-free output stream.
module wimax_deinterleaver
  import deint_pkg::mod_e;
#(
  parameter int unsigned D         = deint_pkg::D,
  parameter int unsigned NCBPS_MAX = deint_pkg::NCBPS_MAX,
  parameter int unsigned DW        = 1,
  parameter int unsigned ADDR_W    = $clog2(NCBPS_MAX),
  parameter int unsigned NCBPS_W   = $clog2(NCBPS_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  mod_e               mod,
  input  logic [NCBPS_W-1:0] ncbps,
  input  logic               in_valid,
  input  logic [DW-1:0]      in_data,
  output logic               out_valid,
  output logic [DW-1:0]      out_data,
  output logic               out_last,
  output logic               sel
);

  // Write side: address generator, data delayed to line up with its output.
  logic [ADDR_W-1:0] waddr;
  logic              wvalid, wlast;
  logic [DW-1:0]     wdata;

  deint_addr_gen #(.D(D), .NCBPS_MAX(NCBPS_MAX), .ADDR_W(ADDR_W), .NCBPS_W(NCBPS_W)) u_agen (
    .clk, .rst_n, .start, .mod, .ncbps, .en(in_valid),
    .addr(waddr), .addr_valid(wvalid), .addr_last(wlast)
  );

  always_ff @(posedge clk) begin
    if (in_valid) wdata <= in_data;
  end

  // Ping-pong control.
  logic              we1, we2, re, rd_bank, rd_last;
  logic [ADDR_W-1:0] raddr;

  bank_ctrl #(.NCBPS_MAX(NCBPS_MAX), .ADDR_W(ADDR_W), .NCBPS_W(NCBPS_W)) u_ctrl (
    .clk, .rst_n, .start, .ncbps,
    .wr_valid(wvalid), .wr_last(wlast),
    .sel, .we1, .we2, .re, .raddr, .rd_bank, .rd_last
  );

  // Memory blocks M-1 and M-2.
  logic [DW-1:0] rdata1, rdata2;

  bit_mem #(.DEPTH(NCBPS_MAX), .DW(DW), .ADDR_W(ADDR_W)) u_m1 (
    .clk, .we(we1), .waddr, .wdata, .re(re && rd_bank), .raddr, .rdata(rdata1)
  );

  bit_mem #(.DEPTH(NCBPS_MAX), .DW(DW), .ADDR_W(ADDR_W)) u_m2 (
    .clk, .we(we2), .waddr, .wdata, .re(re && !rd_bank), .raddr, .rdata(rdata2)
  );

  // Read side: one cycle of memory latency.
  logic rd_bank_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      rd_bank_q <= 1'b0;
    end else begin
      out_valid <= re && !start;
      out_last  <= rd_last && !start;
      rd_bank_q <= rd_bank;
    end
  end

  assign out_data = rd_bank_q ? rdata1 : rdata2;

endmodule
