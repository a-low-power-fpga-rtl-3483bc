// tb_bram_fifo: self-checking test of the block-RAM FIFO.
//
// Random valid on the write side and random ready on the read side, with phases
// that fill the FIFO to full and drain it to empty. A queue in the testbench is
// the reference: every word read must equal the oldest word written. Also
// checks the capacity (DEPTH words in the array plus one in the output stage),
// that out_data holds while stalled, and the fall-through latency (presented one cycle after the write edge).
module tb_bram_fifo;
  localparam int WIDTH = 64, DEPTH = 512;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0;
  logic [WIDTH-1:0] in_data = '0;
  logic in_ready, out_valid;
  logic [WIDTH-1:0] out_data;
  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0;
  int wr_prob = 50, rd_prob = 50;
  int accepted = 0;

  bram_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard at each edge
  logic [WIDTH-1:0] last_data;
  logic             last_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin q.push_back(in_data); accepted++; end
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0 || out_data !== q[0]) begin
        failures++;
        if (failures < 5) $display("data mismatch at %0t", $time);
      end
      if (q.size() != 0) void'(q.pop_front());
    end
    if (last_stall) begin
      checks++;
      if (!out_valid || out_data !== last_data) failures++;
    end
    last_stall <= out_valid && !out_ready;
    last_data  <= out_data;
  end

  bit manual = 1;
  always @(negedge clk) if (!manual) begin
    in_valid  <= ($urandom % 100) < wr_prob;
    in_data   <= {$urandom, $urandom};
    out_ready <= ($urandom % 100) < rd_prob;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: a word written at one edge is presented after the next edge
    wr_prob = 0; rd_prob = 0;
    @(negedge clk); #1 in_valid = 1; in_data = 64'hDEADBEEF_01234567; out_ready = 0;
    @(posedge clk); #1 in_valid = 0;
    checks++;
    if (out_valid) begin failures++; $display("early"); end  // not yet after one edge past the write
    @(posedge clk); #1;
    checks++;
    if (!out_valid || out_data !== 64'hDEADBEEF_01234567) begin failures++; $display("latency"); end
    out_ready = 1;
    @(posedge clk); #1;
    out_ready = 0;
    manual = 0;
    // fill: no reads, count how many words are accepted
    accepted = 0;
    wr_prob = 100; rd_prob = 0;
    repeat (DEPTH + 50) @(posedge clk);
    checks++;
    if (accepted != DEPTH + 1) begin
      failures++;
      $display("capacity %0d, expected %0d", accepted, DEPTH + 1);
    end
    checks++;
    if (in_ready) begin failures++; $display("ready when full"); end
    // random traffic
    wr_prob = 50; rd_prob = 50;
    repeat (5000) @(posedge clk);
    wr_prob = 90; rd_prob = 30;
    repeat (5000) @(posedge clk);
    wr_prob = 30; rd_prob = 90;
    repeat (5000) @(posedge clk);
    wr_prob = 0; rd_prob = 100;
    repeat (DEPTH + 10) @(posedge clk);
    checks++;
    if (q.size() != 0 || out_valid) begin failures++; $display("not drained %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
