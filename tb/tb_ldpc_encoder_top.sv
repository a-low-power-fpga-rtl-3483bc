// tb_ldpc_encoder_top: end-to-end test of the LDPC encoder IP core at its
// default (full CCSDS) size.
//
// Loads a random W through the load port, then streams 22 messages of 64
// words over AXI4-Stream and checks every 80-word codeword against the
// reference model. Three traffic phases:
//   A  source and sink always ready: codewords must follow each other every
//      2 + 5120 cycles (one codeword bit per clock).
//   B  sink stopped for a long time, then random TREADY: the master FIFO
//      fills, the encoder is held by backpressure and the slave FIFO fills
//      until TREADY drops.
//   C  slow source: the encoder waits for message bits mid-codeword.
// Counts each mechanism (row reloads, parity phases, back-to-back codewords,
// message starvation, output backpressure, slave FIFO full, master FIFO full)
// and fails any that never happened. Also checks that the generator memory is
// never read in the parity phase.
module tb_ldpc_encoder_top;
  import ldpc_ref_pkg::*;
  localparam int WD = 64, MSG_WORDS = K / WD, CW_WORDS = N / WD, NMSG = 22;
  logic aclk = 0, aresetn = 0;
  logic [WD-1:0] s_axis_tdata = '0;
  logic s_axis_tvalid = 0, s_axis_tready;
  logic [WD-1:0] m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 0;
  logic g_wr_en = 0;
  logic [4:0] g_wr_row = '0;
  logic [2:0] g_wr_col = '0;
  logic [Z-1:0] g_wr_data = '0;
  ldpc_pkg::enc_state_e enc_state;
  logic cw_done;
  int checks = 0, failures = 0;

  ldpc_encoder_top dut (.*);

  always #5 aclk = ~aclk;

  initial begin
    repeat (1000000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gmat_t g;
  logic [K-1:0] msgs [NMSG];
  int src_prob = 100, snk_prob = 100, src_limit = 0;

  // source
  int sm = 0, sw = 0;
  always @(negedge aclk) begin
    if (!(s_axis_tvalid && !s_axis_tready)) begin
      s_axis_tvalid <= (sm < src_limit) && (($urandom % 1000) < src_prob);
      s_axis_tdata  <= (sm < NMSG) ? msgs[sm][sw*WD +: WD] : '0;
    end
    m_axis_tready <= ($urandom % 100) < snk_prob;
  end
  always @(posedge aclk) if (s_axis_tvalid && s_axis_tready) begin
    if (sw == MSG_WORDS - 1) begin sw <= 0; sm <= sm + 1; end
    else sw <= sw + 1;
  end

  // sink and checker
  int cm = 0, cwi = 0, werr = 0;
  logic [N-1:0] want;
  always @(posedge aclk) if (aresetn && m_axis_tvalid && m_axis_tready) begin
    if (cwi == 0) want = encode(msgs[cm], g);
    if (m_axis_tdata !== want[cwi*WD +: WD]) begin
      werr++;
      if (werr < 4) $display("codeword %0d word %0d wrong", cm, cwi);
    end
    if (cwi == CW_WORDS - 1) begin
      checks++;
      if (werr != 0) failures++;
      werr = 0; cwi = 0; cm++;
    end else cwi++;
  end

  // mechanism counters
  int n_reload = 0, n_parity = 0, n_b2b = 0, n_starve = 0, n_backp = 0;
  int n_sfull = 0, n_mfull = 0, n_mem_in_parity = 0, cyc = 0, last_done = 0;
  int intervals [$];
  ldpc_pkg::enc_state_e prev_state = ldpc_pkg::ST_IDLE;
  always @(posedge aclk) if (aresetn) begin
    cyc++;
    if (dut.u_core.mem_en && enc_state == ldpc_pkg::ST_ENCODE) n_reload++;
    if (enc_state == ldpc_pkg::ST_PARITY && prev_state != ldpc_pkg::ST_PARITY) n_parity++;
    if (enc_state == ldpc_pkg::ST_PRIME && prev_state == ldpc_pkg::ST_IDLE && last_done == cyc - 2) n_b2b++;
    if (enc_state == ldpc_pkg::ST_ENCODE && !dut.msg_valid) n_starve++;
    if ((enc_state == ldpc_pkg::ST_ENCODE || enc_state == ldpc_pkg::ST_PARITY) && !dut.cw_ready) n_backp++;
    if (!s_axis_tready) n_sfull++;
    if (!dut.u_master.f_ready && dut.u_master.word_v_q) n_mfull++;
    if (enc_state == ldpc_pkg::ST_PARITY && dut.u_core.mem_en) n_mem_in_parity++;
    if (cw_done) begin
      intervals.push_back(cyc - last_done);
      last_done = cyc;
    end
    prev_state <= enc_state;
  end

  task automatic wait_cw(input int n);
    while (cm < n) begin @(posedge aclk); #1; end
  endtask

  task automatic check_count(input string what, input int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    for (int r = 0; r < NROW; r++) for (int c = 0; c < NCOL; c++) g[r][c] = rand_row();
    for (int m = 0; m < NMSG; m++) for (int w = 0; w < K/32; w++) msgs[m][w*32 +: 32] = $urandom;
    repeat (3) @(posedge aclk);
    aresetn = 1;
    for (int r = 0; r < NROW; r++) for (int c = 0; c < NCOL; c++) begin
      @(negedge aclk);
      g_wr_en = 1; g_wr_row = 5'(r); g_wr_col = 3'(c); g_wr_data = g[r][c];
    end
    @(negedge aclk); g_wr_en = 0;

    // A: full rate
    src_prob = 1000; snk_prob = 100; src_limit = 3;
    wait_cw(3);
    checks++;
    if (intervals.size() != 3 || intervals[1] != 2 + N || intervals[2] != 2 + N) begin
      failures++;
      $display("codeword period %0d/%0d, expected %0d", intervals[1], intervals[2], 2 + N);
    end else $display("codeword period             %0d cycles", intervals[2]);

    // B: backpressure until both FIFOs fill
    snk_prob = 0; src_limit = 19;
    while (n_backp < 1000 || n_sfull < 1000) begin @(posedge aclk); #1; end
    snk_prob = 70;
    wait_cw(19);

    // C: slow source
    snk_prob = 100; src_prob = 8; src_limit = NMSG;
    wait_cw(NMSG);

    check_count("row reloads", n_reload);
    checks++;
    if (n_reload != NMSG * (NROW - 1)) begin failures++; $display("  expected %0d", NMSG * (NROW - 1)); end
    check_count("parity phases", n_parity);
    check_count("back-to-back codewords", n_b2b);
    check_count("cycles starved of input", n_starve);
    check_count("cycles held by backpressure", n_backp);
    check_count("cycles slave FIFO full", n_sfull);
    check_count("cycles master FIFO full", n_mfull);
    checks++;
    if (n_mem_in_parity != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
