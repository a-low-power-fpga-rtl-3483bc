// tb_encoder_fsm: self-checking test of the encoder controller.
//
// Offers message bits with random gaps and applies random sink backpressure
// over several codewords, and checks against counts worked out from the code
// sizes: K encode steps and M parity shifts per codeword, one generator load at
// memory reads of rows 0, 1, ..., NROW-1 in that order, the first while priming
// and the others with the last step of a block row (never in the parity
// phase), a step only
// when a bit is offered and the sink is ready, the output multiplexer on
// parity for exactly the parity phase, and one cw_done per codeword.
// Without stalls a codeword must take exactly 1 + K + M cycles outside IDLE.
module tb_encoder_fsm;
  localparam int Z = 128, NROW = 32, NCOL = 8, K = Z*NROW, M = Z*NCOL;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0;
  logic in_ready, out_valid, sel_parity, step, shift, mem_en, cw_done;
  logic [4:0] mem_row;
  ldpc_pkg::enc_state_e state;
  int checks = 0, failures = 0;

  encoder_fsm #(.Z(Z), .NROW(NROW), .NCOL(NCOL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int in_prob = 100, out_prob = 100;
  always @(negedge clk) begin
    in_valid  <= ($urandom % 100) < in_prob;
    out_ready <= ($urandom % 100) < out_prob;
  end

  // per-codeword counters
  int steps, shifts, reads, next_row, dones, cycles;
  int bad_step, bad_read, bad_sel;
  task automatic clear();
    steps = 0; shifts = 0; reads = 0; next_row = 0; dones = 0; cycles = 0;
    bad_step = 0; bad_read = 0; bad_sel = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (state != ldpc_pkg::ST_IDLE) cycles++;
    if (step) steps++;
    if (shift) shifts++;
    if (cw_done) dones++;
    if (step && !(in_valid && out_ready && in_ready)) bad_step++;
    if (step && shift) bad_step++;
    if (mem_en) begin
      reads++;
      if (int'(mem_row) != next_row || sel_parity) bad_read++;
      // row 0 before the first step, row r+1 with the last step of row r
      if (next_row == 0 ? (steps != 0) : !(step && steps % Z == 0)) bad_read++;  // steps already counts this step
      next_row++;
    end
    if (sel_parity != (state == ldpc_pkg::ST_PARITY)) bad_sel++;
    if (sel_parity && !out_valid) bad_sel++;
    if (state == ldpc_pkg::ST_ENCODE && out_valid != in_valid) bad_sel++;
  end

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic run_one(input int ip, input int op, input bit timed);
    in_prob = ip; out_prob = op;
    clear();
    while (state != ldpc_pkg::ST_IDLE) begin @(posedge clk); #1; end
    clear();
    while (state == ldpc_pkg::ST_IDLE) begin @(posedge clk); #1; end
    while (state != ldpc_pkg::ST_IDLE) begin @(posedge clk); #1; end
    check("steps", steps, K);
    check("shifts", shifts, M);
    check("memory reads", reads, NROW);
    check("done pulses", dones, 1);
    check("step rule", bad_step, 0);
    check("read order", bad_read, 0);
    check("mux select", bad_sel, 0);
    if (timed) check("cycles", cycles, 1 + K + M);  // PRIME, K steps, M shifts
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_one(100, 100, 1);
    run_one(70, 100, 0);
    run_one(100, 60, 0);
    run_one(50, 50, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
