// axis_slave: AXI4-Stream slave interface of the encoder.
//
// Accepts 64-bit TDATA words with the TVALID/TREADY handshake only (no TLAST,
// TKEEP or TUSER), buffers them in a block-RAM FIFO and serialises them into
// the encoder's bit stream, least significant bit first: message bit 64*w + b
// is bit b of the w-th word of a message. A 64-bit shift register is refilled
// from the FIFO in the cycle its last bit leaves, so the bit stream has no gaps
// while words are available. TREADY is high while the FIFO has room.
// Word width and handshake-only signalling follow the original encoder's interface; the
// bit order, FIFO depth and refill scheme are this design's choices.
module axis_slave #(
  parameter int unsigned W     = ldpc_pkg::AXIS_W,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned BW   = $clog2(W + 1)
) (
  input  logic         aclk,
  input  logic         aresetn,
  input  logic [W-1:0] s_axis_tdata,
  input  logic         s_axis_tvalid,
  output logic         s_axis_tready,
  output logic         bit_valid,
  output logic         bit_data,
  input  logic         bit_ready
);

  logic         f_valid, f_ready;
  logic [W-1:0] f_data;
  logic [W-1:0] sh_q;
  logic [BW-1:0] left_q;   // bits still held in sh_q
  logic         take, load;

  bram_fifo #(.WIDTH(W), .DEPTH(DEPTH)) u_fifo (
    .clk       (aclk),
    .rst_n     (aresetn),
    .in_valid  (s_axis_tvalid),
    .in_ready  (s_axis_tready),
    .in_data   (s_axis_tdata),
    .out_valid (f_valid),
    .out_ready (f_ready),
    .out_data  (f_data)
  );

  assign bit_valid = (left_q != '0);
  assign bit_data  = sh_q[0];
  assign take      = bit_valid && bit_ready;
  assign f_ready   = (left_q == '0) || (left_q == BW'(1) && take);
  assign load      = f_valid && f_ready;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      sh_q   <= '0;
      left_q <= '0;
    end else if (load) begin
      sh_q   <= f_data;
      left_q <= BW'(W);
    end else if (take) begin
      sh_q   <= sh_q >> 1;
      left_q <= left_q - 1'b1;
    end
  end

endmodule
