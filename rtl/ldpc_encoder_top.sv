// ldpc_encoder_top: CCSDS AR4JA (n=5120, k=4096, rate 4/5) LDPC encoder IP core
// with AXI4-Stream interfaces.
//
// Three subsystems run concurrently: the AXI4-Stream slave (FIFO and
// serialiser) feeds message bits, the bit-serial encoder core turns each 4096-bit
// message into a 5120-bit systematic codeword, and the AXI4-Stream master
// (deserialiser and FIFO) sends it out. A message is 64 words of 64 bits, a
// codeword 80 words: words 0..63 repeat the message, words 64..79 carry the
// 1024 parity bits, all least significant bit first. Messages follow each other
// back to back without any framing signal.
// Before use, W (32 x 8 circulant first rows of 128 bits, from the CCSDS
// standard) must be written through the g_wr_* port.
// Throughput: one codeword bit per clock plus 2 cycles per codeword, so
// 5120 / 5122 bits per cycle at the output.
// Clock ACLK, reset ARESETn active low, synchronous.
module ldpc_encoder_top
#(
  parameter int unsigned Z          = ldpc_pkg::Z,
  parameter int unsigned NROW       = ldpc_pkg::NROW,
  parameter int unsigned NCOL       = ldpc_pkg::NCOL,
  parameter int unsigned W          = ldpc_pkg::AXIS_W,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned RW        = $clog2(NROW),
  localparam int unsigned CW        = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic          aclk,
  input  logic          aresetn,
  // AXI4-Stream slave: message
  input  logic [W-1:0]  s_axis_tdata,
  input  logic          s_axis_tvalid,
  output logic          s_axis_tready,
  // AXI4-Stream master: codeword
  output logic [W-1:0]  m_axis_tdata,
  output logic          m_axis_tvalid,
  input  logic          m_axis_tready,
  // generator matrix load port
  input  logic          g_wr_en,
  input  logic [RW-1:0] g_wr_row,
  input  logic [CW-1:0] g_wr_col,
  input  logic [Z-1:0]  g_wr_data,
  // status
  output ldpc_pkg::enc_state_e    enc_state,
  output logic          cw_done
);

  logic msg_valid, msg_bit, msg_ready;
  logic cw_valid, cw_bit, cw_ready;

  axis_slave #(.W(W), .DEPTH(FIFO_DEPTH)) u_slave (
    .aclk, .aresetn,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready,
    .bit_valid (msg_valid),
    .bit_data  (msg_bit),
    .bit_ready (msg_ready)
  );

  encoder_core #(.Z(Z), .NROW(NROW), .NCOL(NCOL)) u_core (
    .clk   (aclk),
    .rst_n (aresetn),
    .msg_valid, .msg_bit, .msg_ready,
    .cw_valid, .cw_bit, .cw_ready,
    .g_wr_en, .g_wr_row, .g_wr_col, .g_wr_data,
    .state (enc_state),
    .cw_done
  );

  axis_master #(.W(W), .DEPTH(FIFO_DEPTH)) u_master (
    .aclk, .aresetn,
    .bit_valid (cw_valid),
    .bit_data  (cw_bit),
    .bit_ready (cw_ready),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready
  );

endmodule
