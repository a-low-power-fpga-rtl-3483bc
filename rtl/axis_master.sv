// axis_master: AXI4-Stream master interface of the encoder.
//
// Collects the encoder's codeword bit stream into 64-bit words, least
// significant bit first (codeword bit 64*w + b is bit b of the w-th word), and
// passes them through a block-RAM FIFO to TDATA with the TVALID/TREADY
// handshake only. A completed word waits in a holding register until the FIFO
// takes it; the bit stream is refused (bit_ready low) only when the 64th bit of
// a word arrives while the previous word is still waiting, so backpressure
// from TREADY reaches the encoder only once the FIFO is full.
// Once TVALID is high, TDATA holds until TREADY (checked by an assertion).
// Word width and handshake-only signalling follow the original encoder's interface; the
// bit order and FIFO depth are this design's choices.
module axis_master #(
  parameter int unsigned W     = ldpc_pkg::AXIS_W,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned BW   = $clog2(W)
) (
  input  logic         aclk,
  input  logic         aresetn,
  input  logic         bit_valid,
  input  logic         bit_data,
  output logic         bit_ready,
  output logic [W-1:0] m_axis_tdata,
  output logic         m_axis_tvalid,
  input  logic         m_axis_tready
);

  logic [W-2:0]  col_q;   // first W-1 bits of the word being collected
  logic [W-1:0]  word_q;
  logic [BW-1:0] idx_q;
  logic          word_v_q;
  logic          f_ready;
  logic          take, last;

  assign last      = (idx_q == BW'(W - 1));
  assign bit_ready = !last || !word_v_q || f_ready;
  assign take      = bit_valid && bit_ready;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      col_q    <= '0;
      word_q   <= '0;
      idx_q    <= '0;
      word_v_q <= 1'b0;
    end else begin
      if (word_v_q && f_ready) word_v_q <= 1'b0;
      if (take) begin
        if (!last) col_q[idx_q] <= bit_data;
        idx_q        <= idx_q + 1'b1;
        if (last) begin
          word_q   <= {bit_data, col_q};
          word_v_q <= 1'b1;
        end
      end
    end
  end

  bram_fifo #(.WIDTH(W), .DEPTH(DEPTH)) u_fifo (
    .clk       (aclk),
    .rst_n     (aresetn),
    .in_valid  (word_v_q),
    .in_ready  (f_ready),
    .in_data   (word_q),
    .out_valid (m_axis_tvalid),
    .out_ready (m_axis_tready),
    .out_data  (m_axis_tdata)
  );

  // AXI4-Stream: a presented transfer stays presented, unchanged, until taken.
  a_tvalid_held: assert property (@(posedge aclk) disable iff (!aresetn)
    (m_axis_tvalid && !m_axis_tready) |=> m_axis_tvalid);
  a_tdata_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    (m_axis_tvalid && !m_axis_tready) |=> $stable(m_axis_tdata));

endmodule
