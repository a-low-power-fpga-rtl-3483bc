// tb_axis_slave: self-checking test of the AXI4-Stream slave interface.
//
// Sends random 64-bit words with random TVALID gaps and holds TDATA until
// TREADY; takes the bit stream with random bit_ready. Every bit must equal the
// next bit of the sent words, least significant bit first. Also checks that
// TREADY drops when the FIFO is full, and that with the sink always ready the
// bit stream has no gaps across word boundaries.
module tb_axis_slave;
  localparam int W = 64, DEPTH = 512;
  logic aclk = 0, aresetn = 0;
  logic [W-1:0] s_axis_tdata = '0;
  logic s_axis_tvalid = 0, s_axis_tready;
  logic bit_valid, bit_data, bit_ready = 0;
  int checks = 0, failures = 0;

  axis_slave #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 aclk = ~aclk;

  initial begin
    repeat (400000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic q[$];
  int src_prob = 100, snk_prob = 100, sent = 0, to_send = 0, bits = 0, gaps = 0, full_seen = 0;
  bit  count_gaps = 0;

  // source: AXI4-Stream rules, a word stays until accepted
  always @(posedge aclk) if (aresetn) begin
    if (s_axis_tvalid && s_axis_tready) begin
      for (int b = 0; b < W; b++) q.push_back(s_axis_tdata[b]);
      sent++;
    end
    if (!s_axis_tready) full_seen++;
    if (bit_valid && bit_ready) begin
      bits++;
      checks++;
      if (q.size() == 0 || bit_data !== q[0]) begin
        failures++;
        if (failures < 5) $display("bit %0d wrong", bits);
      end
      if (q.size() != 0) void'(q.pop_front());
    end else if (count_gaps && bit_ready && q.size() != 0) gaps++;
  end

  always @(negedge aclk) begin
    if (!(s_axis_tvalid && !s_axis_tready)) begin   // may change only when not stalled
      s_axis_tvalid <= (sent < to_send) && (($urandom % 100) < src_prob);
      s_axis_tdata  <= {$urandom, $urandom};
    end
    bit_ready <= ($urandom % 100) < snk_prob;
  end

  initial begin
    repeat (3) @(posedge aclk);
    aresetn = 1;
    // fill while the sink is stopped
    snk_prob = 0; to_send = DEPTH + 20;
    repeat (DEPTH + 40) @(posedge aclk);
    checks++;
    if (full_seen == 0 || s_axis_tready) begin failures++; $display("never full"); end
    // capacity: DEPTH words in the array, one in the output stage, one in the shift register
    checks++;
    if (sent != DEPTH + 2) begin failures++; $display("accepted %0d words while stopped", sent); end
    // drain with the sink always ready: no gaps while data remains
    snk_prob = 100; src_prob = 0;
    @(posedge aclk); #1;
    count_gaps = 1;
    repeat ((DEPTH + 10) * W) @(posedge aclk);
    count_gaps = 0;
    checks++;
    if (gaps != 0) begin failures++; $display("%0d gaps in the bit stream", gaps); end
    // random traffic
    src_prob = 60; snk_prob = 80; to_send = sent + 300;
    repeat (300 * W * 2) @(posedge aclk);
    snk_prob = 100;
    repeat (2000) @(posedge aclk);
    checks++;
    if (q.size() != 0 || bits != sent * W || sent != to_send) begin failures++; $display("left %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
