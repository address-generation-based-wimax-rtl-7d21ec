// bank_ctrl: ping-pong control of the two deinterleaver memory blocks.
//
// `sel` says which memory is being written: sel = 1 writes M-1 and reads
// M-2, sel = 0 writes M-2 and reads M-1. Each write (wr_valid) is steered to
// the write enable of the selected memory. When the last bit of a block has
// been written (wr_valid with wr_last) sel flips, and the memory just filled
// is read out in address order 0 .. Ncbps-1, one address per clock, while
// the next block is written into the other one. The ping-pong scheme and
// the sel polarity follow the standard two-memory (de)interleaver; the
// reset value of sel and the read sequencer are this design's.
//
// Interface: `start` reloads ncbps, sets sel = 1 and abandons any read in
// progress. re/raddr/rd_bank are registered: the first read address comes
// the clock edge after the write with wr_last. rd_last marks the last read
// of a block. rd_bank is 1 while M-1 is read, 0 while M-2 is read.
//
// A block takes at least Ncbps cycles to write, so a read always ends no
// later than the cycle in which the next block's last bit is written; an
// assertion checks this.
module bank_ctrl #(
  parameter int unsigned NCBPS_MAX = deint_pkg::NCBPS_MAX,
  parameter int unsigned ADDR_W    = $clog2(NCBPS_MAX),
  parameter int unsigned NCBPS_W   = $clog2(NCBPS_MAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [NCBPS_W-1:0] ncbps,
  input  logic               wr_valid,
  input  logic               wr_last,
  output logic               sel,
  output logic               we1,
  output logic               we2,
  output logic               re,
  output logic [ADDR_W-1:0]  raddr,
  output logic               rd_bank,
  output logic               rd_last
);

  logic [NCBPS_W-1:0] ncbps_q;
  logic               swap;

  assign swap    = wr_valid && wr_last && !start;
  assign we1     = wr_valid &&  sel;
  assign we2     = wr_valid && !sel;
  assign rd_last = re && (NCBPS_W'(raddr) == ncbps_q - NCBPS_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncbps_q <= NCBPS_W'(NCBPS_MAX);
      sel     <= 1'b1;
      re      <= 1'b0;
      raddr   <= '0;
      rd_bank <= 1'b0;
    end else if (start) begin
      ncbps_q <= ncbps;
      sel     <= 1'b1;
      re      <= 1'b0;
      raddr   <= '0;
      rd_bank <= 1'b0;
    end else if (swap) begin
      sel     <= !sel;
      re      <= 1'b1;
      raddr   <= '0;
      rd_bank <= sel;            // read the memory that was just written
    end else if (re) begin
      if (rd_last) begin
        re    <= 1'b0;
        raddr <= '0;
      end else begin
        raddr <= raddr + ADDR_W'(1);
      end
    end
  end

  // The read of a block must be over before the next one is due.
  assert property (@(posedge clk) disable iff (!rst_n) swap |-> !re || rd_last);
  // Never read the memory that is being written.
  assert property (@(posedge clk) disable iff (!rst_n) re |-> rd_bank != sel);

endmodule
