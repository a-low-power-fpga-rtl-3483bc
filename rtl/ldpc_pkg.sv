// ldpc_pkg: shared sizes and types of the CCSDS AR4JA rate-4/5, k=4096 LDPC encoder.
//
// The code is systematic: a codeword is the 4096 message bits followed by 1024
// parity bits, p = u * W, where W is a 4096 x 1024 matrix of 128 x 128 circulants
// (32 block rows by 8 block columns). A circulant is fully described by its first
// row; row j of a circulant is that first row cyclically shifted by j towards
// higher bit indices, i.e. element (j,k) = first_row[(k - j) mod 128].
// The sizes follow the code; the 64-bit stream width follows the original encoder's interface.
package ldpc_pkg;

  localparam int unsigned Z      = 128;      // circulant size
  localparam int unsigned NROW   = 32;       // block rows of W   (K / Z)
  localparam int unsigned NCOL   = 8;        // block columns of W (M / Z), one RCE each
  localparam int unsigned K      = Z * NROW; // message bits: 4096
  localparam int unsigned M      = Z * NCOL; // parity bits: 1024
  localparam int unsigned N      = K + M;    // codeword bits: 5120
  localparam int unsigned AXIS_W = 64;       // AXI4-Stream TDATA width

  // Phases of the encoder controller.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,  // waiting for a message; memory and shift registers idle
    ST_PRIME  = 2'd1,  // read block row 0 of W into the memory output register
    ST_ENCODE = 2'd2,  // one message bit per step: systematic output, RCE accumulate
    ST_PARITY = 2'd3   // RCEs chained into one shift register, parity bits shifted out
  } enc_state_e;

endpackage
