// encoder_fsm: controller that sequences one codeword through the encoder.
//
// Phases (ldpc_pkg::enc_state_e):
//   IDLE    nothing enabled; leaves as soon as a message bit is offered.
//   PRIME   reads block row 0 of W into the generator memory's output
//           register, which serves as the generator register of the RCEs.
//   ENCODE  K steps. A step happens in a cycle where a message bit is offered
//           (in_valid) and the codeword sink can take the systematic copy
//           (out_ready); it advances the bit counter. The last step of a block
//           row also reads the next block row, so the memory output changes to
//           row r+1 at the same clock edge at which the RCEs finish row r. The
//           memory is enabled in that one cycle per block row only; no read
//           follows the last row.
//   PARITY  M shifts, one per cycle the sink is ready; the output multiplexer
//           selects the serial parity bit. Then back to IDLE.
// With no stalls a codeword takes 1 + 1 + K + M cycles (IDLE to IDLE), i.e.
// one codeword bit per clock plus two cycles.
// The phase order, the row reload every Z bits, the memory switched off in the
// parity phase and the one-bit-per-cycle rate follow the original encoder description; the priming
// state and the exact handshake are this design's choices.
module encoder_fsm #(
  parameter int unsigned Z    = ldpc_pkg::Z,
  parameter int unsigned NROW = ldpc_pkg::NROW,
  parameter int unsigned NCOL = ldpc_pkg::NCOL,
  localparam int unsigned RW  = $clog2(NROW),
  localparam int unsigned ZW  = $clog2(Z),
  localparam int unsigned CNTW = RW + ZW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,   // a message bit is offered
  output logic          in_ready,   // the message bit is taken this cycle (if valid)
  output logic          out_valid,  // a codeword bit is presented
  input  logic          out_ready,  // codeword sink can take a bit
  output logic          sel_parity, // output multiplexer: 0 systematic, 1 parity
  output logic          step,       // RCE encode step enable
  output logic          shift,      // RCE parity shift enable
  output logic          mem_en,     // generator memory read enable
  output logic [RW-1:0] mem_row,    // generator memory read address
  output ldpc_pkg::enc_state_e state,
  output logic          cw_done     // pulses with the last parity shift
);

  localparam int unsigned MBITS = Z * NCOL;

  ldpc_pkg::enc_state_e state_q, state_d;
  logic [CNTW-1:0] cnt_q, cnt_d;     // bit index within the phase

  logic [RW-1:0] row;
  logic [ZW-1:0] pos;
  assign row = cnt_q[CNTW-1:ZW];
  assign pos = cnt_q[ZW-1:0];

  always_comb begin
    state_d    = state_q;
    cnt_d      = cnt_q;
    in_ready   = 1'b0;
    out_valid  = 1'b0;
    sel_parity = 1'b0;
    step       = 1'b0;
    shift      = 1'b0;
    mem_en     = 1'b0;
    mem_row    = row + 1'b1;
    cw_done    = 1'b0;

    unique case (state_q)
      ldpc_pkg::ST_IDLE: begin
        if (in_valid) state_d = ldpc_pkg::ST_PRIME;
      end
      ldpc_pkg::ST_PRIME: begin
        mem_en  = 1'b1;
        mem_row = '0;
        cnt_d   = '0;
        state_d = ldpc_pkg::ST_ENCODE;
      end
      ldpc_pkg::ST_ENCODE: begin
        in_ready  = out_ready;
        out_valid = in_valid;
        step      = in_valid && out_ready;
        if (step) begin
          cnt_d = cnt_q + 1'b1;
          if (pos == ZW'(Z - 1)) begin
            if (row != RW'(NROW - 1)) begin
              mem_en = 1'b1;           // next block row, ready for the next step
            end else begin
              cnt_d   = '0;
              state_d = ldpc_pkg::ST_PARITY;
            end
          end
        end
      end
      ldpc_pkg::ST_PARITY: begin
        out_valid  = 1'b1;
        sel_parity = 1'b1;
        shift      = out_ready;
        if (shift) begin
          cnt_d = cnt_q + 1'b1;
          if (cnt_q == CNTW'(MBITS - 1)) begin
            cnt_d   = '0;
            cw_done = 1'b1;
            state_d = ldpc_pkg::ST_IDLE;
          end
        end
      end
      default: state_d = ldpc_pkg::ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ldpc_pkg::ST_IDLE;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
    end
  end

  assign state = state_q;

  // The generator memory is read only when priming or at a block row boundary,
  // never in the parity phase.
  a_read_at_boundary: assert property (@(posedge clk) disable iff (!rst_n)
    mem_en |-> (state_q == ldpc_pkg::ST_PRIME) || (step && pos == ZW'(Z - 1)));
  // The phase counter must be able to count the parity bits.
  initial assert (MBITS <= (1 << CNTW)) else $error("parity length exceeds counter range");

endmodule
