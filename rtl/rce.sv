// rce: Recursive Convolutional Encoder for one 128-bit block column of W.
//
// g is the first row of the current circulant of W. It comes straight from the
// output register of the generator memory, which holds it for the 128 steps of
// a block row, so the RCE itself stores only the parity accumulator acc_q.
// In the encode phase each step ANDs the message bit with every generator bit,
// XORs the result into the accumulator and rotates the accumulator by one
// position, closing the ring through a feedback from the last register to the
// first XOR:
//     acc_next = rotate_right(acc ^ (msg_bit ? g : 0))
// After the 128 steps of a block row the accumulator has gained
// sum_j u_j * (first row shifted by j), the product of those 128 message bits
// with the circulant. In the parity phase the feedback selector (the
// demultiplexer of the standard RCE) takes chain_in, the output of
// the neighbouring RCE, instead, and the register becomes a plain right shift
// register: chain_out presents acc[0], acc[1], ... on successive shifts.
// Because chain_in is 0 for the RCE at the head of the chain, shifting all
// parity out also clears the accumulators for the next codeword.
//
// Interface: step (encode) and shift (parity) are clock enables and must not be
// high together; g must be stable during the steps of a block row. One clock
// per step. Reset (synchronous, active low) clears the accumulator.
// The structure (AND, XOR, register ring, feedback selector) follows the
// standard RCE; the bit order of g and acc is this design's choice.
module rce #(
  parameter int unsigned Z = ldpc_pkg::Z
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [Z-1:0] g,         // first row of the circulant (memory output)
  input  logic         step,      // encode step enable
  input  logic         msg_bit,   // message bit of this step
  input  logic         shift,     // parity shift enable
  input  logic         chain_in,  // acc[0] of the next RCE in the chain
  output logic         chain_out  // acc[0]: serial parity output
);

  logic [Z-1:0] acc_q, acc_d, sum;

  // AND with the message bit, XOR with the stored result.
  assign sum = acc_q ^ (g & {Z{msg_bit}});

  always_comb begin
    acc_d = acc_q;
    if (step)       acc_d = {sum[0], sum[Z-1:1]};      // ring: feedback from acc[0]
    else if (shift) acc_d = {chain_in, acc_q[Z-1:1]};  // chain: right shift
  end

  always_ff @(posedge clk) begin
    if (!rst_n) acc_q <= '0;
    else        acc_q <= acc_d;
  end

  assign chain_out = acc_q[0];

endmodule
