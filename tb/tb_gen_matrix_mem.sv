// tb_gen_matrix_mem: self-checking test of the generator memory.
//
// Writes random first rows to every (block row, block column) in random order,
// keeps a copy in the testbench, then reads block rows in random order and
// checks the 1024-bit word one cycle after each enabled read. Checks that the
// output holds its value while the read enable is low, even when the address
// changes.
module tb_gen_matrix_mem;
  localparam int Z = 128, NROW = 32, NCOL = 8;
  logic clk = 0;
  logic en = 0, wr_en = 0;
  logic [4:0] rd_row = '0, wr_row = '0;
  logic [2:0] wr_col = '0;
  logic [Z-1:0] wr_data = '0;
  logic [NCOL*Z-1:0] rd_data;
  logic [Z-1:0] model [NROW][NCOL];
  int checks = 0, failures = 0;

  gen_matrix_mem #(.Z(Z), .NROW(NROW), .NCOL(NCOL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NCOL*Z-1:0] row_word(input int r);
    logic [NCOL*Z-1:0] v;
    for (int c = 0; c < NCOL; c++) v[c*Z +: Z] = model[r][c];
    return v;
  endfunction

  task automatic write_cell(input int r, input int c);
    logic [Z-1:0] d;
    for (int w = 0; w < Z/32; w++) d[w*32 +: 32] = $urandom;
    @(negedge clk);
    wr_en = 1; wr_row = 5'(r); wr_col = 3'(c); wr_data = d;
    model[r][c] = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    for (int r = 0; r < NROW; r++) for (int c = 0; c < NCOL; c++) write_cell(r, c);
    // overwrite some cells at random
    repeat (100) write_cell($urandom % NROW, $urandom % NCOL);
    repeat (300) begin
      int r;
      logic [NCOL*Z-1:0] held;
      r = $urandom % NROW;
      @(negedge clk); en = 1; rd_row = 5'(r);
      @(negedge clk); en = 0;
      checks++;
      if (rd_data !== row_word(r)) begin
        failures++;
        if (failures < 5) $display("row %0d mismatch", r);
      end
      held = rd_data;
      rd_row = 5'($urandom);
      @(negedge clk);
      checks++;
      if (rd_data !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
