// deint_pkg: constants and types shared by the IEEE 802.16e channel
// deinterleaver.
//
// The deinterleaver treats a block of Ncbps coded bits as a matrix of D = 16
// rows and Ncbps/16 columns. Received bit n sits in row j = n / (Ncbps/16) and
// column i = n % (Ncbps/16); its deinterleaved position is k = D*i' + j, where
// i' is i, i+-1 or i+-2 depending on the modulation and on (i, j) modulo the
// modulation's bit-group size s (1, 2 or 3). The row count D = 16 and the
// largest block of 576 bits are the standard's numbers; the enum encodings
// are this design's own.
package deint_pkg;

  // Number of rows of the deinterleaver matrix (d in the standard).
  localparam int unsigned D = 16;
  // Largest interleaver depth Ncbps of IEEE 802.16e (bits per block).
  localparam int unsigned NCBPS_MAX = 576;

  // Modulation, i.e. the bit-group size s = 1, 2 or 3.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,   // s = 1
    MOD_QAM16 = 2'd1,   // s = 2
    MOD_QAM64 = 2'd2    // s = 3
  } mod_e;

  // What the column path does to the column index i.
  typedef enum logic [1:0] {
    COL_KEEP = 2'd0,    // i' = i
    COL_INC  = 2'd1,    // i' = i + step
    COL_DEC  = 2'd2     // i' = i - step
  } col_op_e;

  // Column control produced by the 16-QAM and 64-QAM blocks.
  typedef struct packed {
    col_op_e op;
    logic    step2;     // 1: step is 2, 0: step is 1
  } col_ctl_t;

  localparam col_ctl_t COL_CTL_KEEP = '{op: COL_KEEP, step2: 1'b0};

endpackage
