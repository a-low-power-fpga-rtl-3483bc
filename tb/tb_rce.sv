// tb_rce: self-checking test of one recursive convolutional encoder.
//
// Presents random generator rows, feeds several block rows of 128 random message
// bits (with idle cycles in between to check that the register holds), and
// compares the accumulator, read out through the parity shift, with the
// circulant product computed directly: for every message bit u_j of a block row,
// the first row rotated by j (bit k = g[(k-j) mod Z]) is XORed in. A second
// pass checks that chain_in enters the register on shifts.
module tb_rce;
  localparam int Z = 128;
  logic clk = 0, rst_n = 0;
  logic step = 0, msg_bit = 0, shift = 0, chain_in = 0;
  logic [Z-1:0] g = '0;
  logic chain_out;
  int checks = 0, failures = 0;

  rce #(.Z(Z)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [Z-1:0] rotl(input logic [Z-1:0] v, input int j);
    logic [Z-1:0] r;
    for (int k = 0; k < Z; k++) r[k] = v[(k - j + Z) % Z];
    return r;
  endfunction

  logic [Z-1:0] expect_acc, grow, chained;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int trial = 0; trial < 6; trial++) begin
      expect_acc = '0;
      for (int blk = 0; blk < 3; blk++) begin
        for (int w = 0; w < Z/32; w++) grow[w*32 +: 32] = $urandom;
        if (trial == 0 && blk == 0) grow = 128'h1;  // single-tap row
        g = grow;
        for (int j = 0; j < Z; j++) begin
          logic u;
          u = (trial == 0 && blk == 0) ? (j == 5) : 1'($urandom);
          if (u) expect_acc ^= rotl(grow, j);
          msg_bit = u; step = 1;
          @(negedge clk);
          step = 0;
          if ($urandom % 4 == 0) begin msg_bit = 1; @(negedge clk); end  // idle cycle
          if ($urandom % 8 == 0) begin g = ~grow; @(negedge clk); g = grow; end  // g changes while idle
        end
      end
      // read out with parity shifts, feeding a known pattern behind
      for (int w = 0; w < Z/32; w++) chained[w*32 +: 32] = $urandom;
      g = ~g;  // generator input must not matter in the parity phase
      for (int k = 0; k < Z; k++) begin
        checks++;
        if (chain_out !== expect_acc[k]) begin
          failures++;
          if (failures < 10) $display("trial %0d bit %0d: got %b want %b", trial, k, chain_out, expect_acc[k]);
        end
        chain_in = chained[k]; shift = 1;
        @(negedge clk);
        shift = 0;
        if ($urandom % 5 == 0) @(negedge clk);
      end
      // the pattern shifted in must now sit in the register in order
      for (int k = 0; k < Z; k++) begin
        checks++;
        if (chain_out !== chained[k]) failures++;
        chain_in = 0; shift = 1;
        @(negedge clk);
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
