// gen_matrix_mem: block memory holding the first rows of the circulants of W.
//
// One word per block row of W: NCOL circulant first rows of Z bits side by
// side, 32 x 1024 bits for the CCSDS code. All NCOL first rows of a block row
// are read together, once per 128 encoded bits, so the read port is NCOL*Z
// wide. The memory is built as NCOL column memories of NROW x Z bits that
// share the read address; circulant c sits in rd_data[c*Z +: Z], with bit k of
// that field being element (0,k) of the circulant.
//
// Read port: synchronous, one cycle latency, with enable. With en low the
// output register keeps its value and the array is not accessed, so the
// memory draws no dynamic power between the once-per-block-row reads. The
// output register is the generator register of the RCEs: it holds the
// current block row for the 128 steps that use it.
// Write port: one circulant first row (Z bits) per cycle, addressed by block
// row and block column. It loads the code's W at start-up; the contents are
// those defined by the CCSDS standard and are not built into this RTL.
// The memory itself and its row organisation follow the original encoder description; the write
// port is this design's choice.
module gen_matrix_mem #(
  parameter int unsigned Z    = ldpc_pkg::Z,
  parameter int unsigned NROW = ldpc_pkg::NROW,
  parameter int unsigned NCOL = ldpc_pkg::NCOL,
  localparam int unsigned RW  = $clog2(NROW),
  localparam int unsigned CW  = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic              clk,
  // read port
  input  logic              en,
  input  logic [RW-1:0]     rd_row,
  output logic [NCOL*Z-1:0] rd_data,
  // load port
  input  logic              wr_en,
  input  logic [RW-1:0]     wr_row,
  input  logic [CW-1:0]     wr_col,
  input  logic [Z-1:0]      wr_data
);

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic [Z-1:0] mem [NROW];

    always_ff @(posedge clk) begin
      if (wr_en && wr_col == CW'(c)) mem[wr_row] <= wr_data;
    end

    always_ff @(posedge clk) begin
      if (en) rd_data[c*Z +: Z] <= mem[rd_row];
    end
  end

endmodule
