// tb_axis_master: self-checking test of the AXI4-Stream master interface.
//
// Offers random bits with random gaps and applies random TREADY. Every TDATA
// word taken must hold the next 64 offered bits, least significant bit first.
// Checks the AXI4-Stream rule (TVALID held and TDATA stable while TREADY is
// low), that bit_ready drops once the FIFO and holding register are full while
// TREADY is low, and that nothing is lost when the stream resumes.
module tb_axis_master;
  localparam int W = 64, DEPTH = 512;
  logic aclk = 0, aresetn = 0;
  logic bit_valid = 0, bit_data = 0, bit_ready;
  logic [W-1:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 0;
  int checks = 0, failures = 0;

  axis_master #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 aclk = ~aclk;

  initial begin
    repeat (600000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic q[$];
  int src_prob = 100, snk_prob = 0, words = 0, offered = 0, blocked = 0;
  logic [W-1:0] prev_data;
  logic prev_stall = 0;

  always @(posedge aclk) if (aresetn) begin
    if (bit_valid && bit_ready) begin q.push_back(bit_data); offered++; end
    if (bit_valid && !bit_ready) blocked++;
    if (prev_stall) begin
      checks++;
      if (!m_axis_tvalid || m_axis_tdata !== prev_data) failures++;
    end
    prev_stall <= m_axis_tvalid && !m_axis_tready;
    prev_data  <= m_axis_tdata;
    if (m_axis_tvalid && m_axis_tready) begin
      logic [W-1:0] want;
      for (int b = 0; b < W; b++) want[b] = (q.size() > b) ? q[b] : 1'bx;
      checks++;
      if (q.size() < W || m_axis_tdata !== want) begin
        failures++;
        if (failures < 5) $display("word %0d wrong", words);
      end
      repeat (W) if (q.size() != 0) void'(q.pop_front());
      words++;
    end
  end

  always @(negedge aclk) begin
    if (!(bit_valid && !bit_ready)) begin
      bit_valid <= ($urandom % 100) < src_prob;
      bit_data  <= 1'($urandom);
    end
    m_axis_tready <= ($urandom % 100) < snk_prob;
  end

  initial begin
    repeat (3) @(posedge aclk);
    aresetn = 1;
    // sink stopped: the FIFO fills (DEPTH + 1 words) plus the holding word
    src_prob = 100; snk_prob = 0;
    repeat ((DEPTH + 4) * W) @(posedge aclk);
    checks++;
    if (blocked == 0 || offered != (DEPTH + 2) * W + (W - 1)) begin
      failures++;
      $display("accepted %0d bits before blocking, blocked %0d", offered, blocked);
    end
    // random traffic
    snk_prob = 50; src_prob = 70;
    repeat (200000) @(posedge aclk);
    // drain complete words
    src_prob = 0; snk_prob = 100;
    repeat ((DEPTH + 10) * 2) @(posedge aclk);
    checks++;
    if (q.size() >= W || m_axis_tvalid) begin failures++; $display("not drained: %0d bits", q.size()); end
    checks++;
    if (words * W + q.size() != offered) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
