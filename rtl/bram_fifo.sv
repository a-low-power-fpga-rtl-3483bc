// bram_fifo: synchronous first-word-fall-through FIFO whose storage is a
// block-RAM style array with a registered read port.
//
// Both sides use valid/ready handshakes: a word moves when valid and ready are
// high at a clock edge. The array holds up to DEPTH words; the RAM's own output
// register doubles as the output stage, so the FIFO holds DEPTH+1 words and a
// written word can leave two cycles after it entered. The array is read only
// when the output register is empty or being emptied, and written only on an
// accepted word, so it is idle whenever the stream is.
// out_data is stable while out_valid is high and out_ready low, as an
// AXI4-Stream master requires. Reset (synchronous, active low) empties it;
// the array and output data are not reset, like a block RAM.
// A BRAM-based FIFO at each interface follows the original encoder description; DEPTH and the
// output-stage arrangement are this design's choices.
module bram_fifo #(
  parameter int unsigned WIDTH = ldpc_pkg::AXIS_W,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      cnt;
  logic             q_v;
  logic             wr, rd;

  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign wr        = in_valid && in_ready;
  assign rd        = (cnt != '0) && (!q_v || out_ready);
  assign out_valid = q_v;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rd) out_data <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
      q_v  <= 1'b0;
    end else begin
      if (wr) wptr <= next_ptr(wptr);
      if (rd) rptr <= next_ptr(rptr);
      cnt <= cnt + (AW+1)'(wr) - (AW+1)'(rd);
      if (rd)             q_v <= 1'b1;
      else if (out_ready) q_v <= 1'b0;
    end
  end

endmodule
