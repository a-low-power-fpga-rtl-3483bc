// encoder_core: the bit-serial quasi-cyclic LDPC encoder.
//
// Takes the message one bit per step and produces the codeword one bit per
// clock: first the K message bits themselves (systematic part, passed straight
// to the output multiplexer), then the M parity bits p = u * W.
// NCOL recursive convolutional encoders (rce), one per block column of W, work
// in parallel; each sees the first row of its circulant of the current block
// row and accumulates the message bits into Z parity bits. The generator
// memory (gen_matrix_mem) output register holds the current block row; with
// the last message bit of a block row the controller (encoder_fsm) reads the
// next one. After the last message bit the feedback selectors
// switch and the NCOL rings become one M-bit right shift register whose output
// is the parity stream. RCE 0 sits at the output end, so parity bits leave in
// the order p[0], p[1], ..., p[M-1], where p[c*Z + k] is bit k of the product
// with block column c.
//
// Streams: msg_* (bit in) and cw_* (bit out) use valid/ready; a message bit is
// consumed in the same cycle its systematic copy is taken by the sink
// (msg_ready depends combinationally on cw_ready, cw_valid on msg_valid in the
// encode phase). g_wr_* loads W. Latency: the first codeword bit is taken 2
// cycles after the first message bit is offered (IDLE, PRIME); then one bit per
// clock without stalls, 2 + 5120 cycles per codeword.
// Architecture follows the original encoder description; bit orders and handshake are this design's.
module encoder_core
#(
  parameter int unsigned Z    = ldpc_pkg::Z,
  parameter int unsigned NROW = ldpc_pkg::NROW,
  parameter int unsigned NCOL = ldpc_pkg::NCOL,
  localparam int unsigned RW  = $clog2(NROW),
  localparam int unsigned CW  = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // message bit stream
  input  logic          msg_valid,
  input  logic          msg_bit,
  output logic          msg_ready,
  // codeword bit stream
  output logic          cw_valid,
  output logic          cw_bit,
  input  logic          cw_ready,
  // generator memory load port
  input  logic          g_wr_en,
  input  logic [RW-1:0] g_wr_row,
  input  logic [CW-1:0] g_wr_col,
  input  logic [Z-1:0]  g_wr_data,
  // status
  output ldpc_pkg::enc_state_e    state,
  output logic          cw_done
);

  logic              sel_parity, step, shift, mem_en;
  logic [RW-1:0]     mem_row;
  logic [NCOL*Z-1:0] mem_q;
  logic [NCOL:0]     chain;   // chain[c] = acc[0] of RCE c; chain[NCOL] = 0

  encoder_fsm #(.Z(Z), .NROW(NROW), .NCOL(NCOL)) u_fsm (
    .clk, .rst_n,
    .in_valid  (msg_valid),
    .in_ready  (msg_ready),
    .out_valid (cw_valid),
    .out_ready (cw_ready),
    .sel_parity, .step, .shift, .mem_en, .mem_row,
    .state, .cw_done
  );

  gen_matrix_mem #(.Z(Z), .NROW(NROW), .NCOL(NCOL)) u_mem (
    .clk,
    .en      (mem_en),
    .rd_row  (mem_row),
    .rd_data (mem_q),
    .wr_en   (g_wr_en),
    .wr_row  (g_wr_row),
    .wr_col  (g_wr_col),
    .wr_data (g_wr_data)
  );

  assign chain[NCOL] = 1'b0;

  for (genvar c = 0; c < NCOL; c++) begin : g_rce
    rce #(.Z(Z)) u_rce (
      .clk, .rst_n,
      .g         (mem_q[c*Z +: Z]),
      .step,
      .msg_bit,
      .shift,
      .chain_in  (chain[c+1]),
      .chain_out (chain[c])
    );
  end

  // output multiplexer: systematic bit, then parity
  assign cw_bit = sel_parity ? chain[0] : msg_bit;

endmodule
