// tb_encoder_core: self-checking test of the bit-serial encoder.
//
// Loads a random W (the CCSDS values are not needed to test the datapath:
// any W exercises every AND/XOR), then encodes a sequence of messages,
// including an all-zero message, a single-one message and random ones, and
// compares every codeword bit with the reference model. The first codeword runs
// without stalls and must take 2 + K + M cycles from the first offered bit to
// the end of the parity phase; later ones have random gaps in the message
// stream and random backpressure on the codeword stream.
module tb_encoder_core;
  import ldpc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic msg_valid = 0, msg_bit = 0, msg_ready;
  logic cw_valid, cw_bit, cw_ready = 0;
  logic g_wr_en = 0;
  logic [4:0] g_wr_row = '0;
  logic [2:0] g_wr_col = '0;
  logic [Z-1:0] g_wr_data = '0;
  ldpc_pkg::enc_state_e state;
  logic cw_done;
  int checks = 0, failures = 0;

  encoder_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gmat_t g;
  logic [K-1:0] msgs [6];
  int in_prob = 100, out_prob = 100;

  // message driver: bit i of the current message, advanced on acceptance
  int mi = 0, bi = 0;
  always @(negedge clk) begin
    if (mi < 6) begin
      msg_valid <= ($urandom % 100) < in_prob;
      msg_bit   <= msgs[mi][bi];
    end else msg_valid <= 0;
    cw_ready <= ($urandom % 100) < out_prob;
  end
  always @(posedge clk) if (msg_valid && msg_ready) begin
    if (bi == K - 1) begin bi <= 0; mi <= mi + 1; end
    else bi <= bi + 1;
  end

  // codeword monitor
  int ci = 0, co = 0, bit_err = 0, dones = 0;
  logic [N-1:0] want;
  always @(posedge clk) if (rst_n) begin
    if (cw_done) dones++;
    if (cw_valid && cw_ready) begin
      if (ci == 0) want = encode(msgs[co], g);
      if (cw_bit !== want[ci]) begin
        bit_err++;
        if (bit_err < 5) $display("codeword %0d bit %0d: got %b want %b", co, ci, cw_bit, want[ci]);
      end
      if (ci == N - 1) begin
        checks++;
        if (bit_err != 0) failures++;
        bit_err = 0;
        ci = 0; co++;
      end else ci++;
    end
  end

  int t0, t1, cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    for (int r = 0; r < NROW; r++) for (int c = 0; c < NCOL; c++) g[r][c] = rand_row();
    msgs[0] = '0;
    for (int w = 0; w < K/32; w++) msgs[0][w*32 +: 32] = $urandom;
    msgs[1] = '0;
    msgs[2] = '0; msgs[2][130] = 1'b1;
    for (int m = 3; m < 6; m++) for (int w = 0; w < K/32; w++) msgs[m][w*32 +: 32] = $urandom;
    in_prob = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NROW; r++) for (int c = 0; c < NCOL; c++) begin
      @(negedge clk);
      g_wr_en = 1; g_wr_row = 5'(r); g_wr_col = 3'(c); g_wr_data = g[r][c];
    end
    @(negedge clk); g_wr_en = 0;
    // first codeword, no stalls, timed
    in_prob = 100;
    @(posedge clk); #1;
    while (!msg_valid) begin @(posedge clk); #1; end
    t0 = cyc;
    while (co < 1) begin @(posedge clk); #1; end
    t1 = cyc;
    checks++;
    // edges from the end of the idle cycle in which the first bit is offered to
    // the edge taking the last parity bit: one priming cycle plus one per bit
    if ((t1 - t0) != 1 + N) begin
      failures++;
      $display("codeword took %0d cycles, expected %0d", (t1 - t0), 1 + N);
    end
    in_prob = 70; out_prob = 60;
    while (co < 6) begin @(posedge clk); #1; end
    checks++;
    if (dones != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
