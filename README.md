# Bit-serial LDPC encoder for the CCSDS AR4JA rate-4/5 code

This is an LDPC encoder for the CCSDS AR4JA code with 4096 message bits and
rate 4/5. It turns each 4096-bit message into a 5120-bit codeword: the message
itself followed by 1024 parity bits. It is meant for a low-power FPGA, for
example a small satellite's science-data downlink. Messages arrive and
codewords leave on 64-bit AXI4-Stream interfaces. Between them, an encoder
processes one bit per clock.

The design rests on one fact about the code. The generator matrix is
`G = [I | W]`, and W (4096 x 1024) is made of 32 x 8 *circulants* of
128 x 128 bits. A circulant is fixed by its first row; every other row is that
row rotated. So the encoder stores only 32 x 8 first rows (32 kbit), never the
full 4 Mbit matrix. Eight small shift-register circuits, one per block column
of W, rebuild the rotations as the message streams past.

## Data flow

```
            64-bit words        1 bit/clk                1 bit/clk        64-bit words
 s_axis --> [axis_slave] ------> [encoder_core] ---------> [axis_master] --> m_axis
            BRAM FIFO +          FSM, generator memory,    deserialiser +
            serialiser           8 RCEs, output mux        BRAM FIFO
```

The three stages are separate. Each connects to the next with a one-bit
valid/ready stream, and they all run at the same time: the slave can buffer the
next message and the master can drain the last codeword while the encoder works.

| module | role |
|---|---|
| `ldpc_encoder_top` | the IP core: three stages and the W load port |
| `axis_slave` | AXI4-Stream slave: FIFO, then 64-to-1 serialiser (LSB first) |
| `encoder_core` | controller, generator memory, 8 RCEs, feedback selectors, output multiplexer |
| `encoder_fsm` | phase controller (IDLE, PRIME, ENCODE, PARITY) |
| `gen_matrix_mem` | 32 x 1024-bit memory of circulant first rows, with a registered read |
| `rce` | one recursive convolutional encoder (128-bit parity accumulator) |
| `axis_master` | 1-to-64 deserialiser (LSB first), FIFO, AXI4-Stream master |
| `bram_fifo` | first-word-fall-through FIFO on a block-RAM style array |
| `ldpc_pkg` | code sizes and the phase type |

## How an RCE computes a circulant product

Take one block row of W (block row `r`) and one block column `c`. Let `g` be
the circulant's first row, so element `(j,k)` is `g[(k-j) mod 128]`. The 128
message bits `u_j` of this block row add `u_j * rotate(g, j)` to the parity
bits of column `c`.

Each RCE has a 128-bit accumulator `acc`. At each message bit it computes

```
acc <= rotate_right(acc ^ (u_j ? g : 0))        // bit k takes bit k+1
```

The term added at step `j` is rotated a further 127-j times before the 128
steps end. Counting the rotation in its own step, that is 128-j positions,
which equals a rotation of `-j`. So after 128 steps every term sits exactly
where the circulant puts it, and earlier block rows have made a full turn
back to their place. Each RCE stores only its accumulator. The `g` it uses
comes straight from the output register of the generator memory.

The parity bits of block column `c` are bits `K + 128c + k` of the codeword.
To output them, the feedback selector at the top of each ring switches from
the ring's own output (`acc[0]`) to the next RCE's `acc[0]`. The eight rings
then form one 1024-bit right shift register. RCE 0 sits at the output end, so
parity leaves in the order p[0], p[1], ..., p[1023]. The RCE at the far end
shifts in zeros, so after the parity phase all accumulators are clear for the
next message without any extra clear cycle.

## Controller timing

| phase | cycles (no stalls) | what happens |
|---|---|---|
| IDLE | 1 | waits for the first message bit |
| PRIME | 1 | reads block row 0 into the memory output register |
| ENCODE | 4096 | one step per message bit. The systematic bit goes to the output. The last step of each block row also reads the next row, so the memory output changes at the clock edge that finishes the row. |
| PARITY | 1024 | one shift per bit, output multiplexer on parity. The memory is not accessed. |

A step needs both a message bit (`msg_valid`) and a free output slot
(`cw_ready`). The systematic copy of the bit is written out in the same cycle.
With no stalls, one codeword takes 5122 clocks, which is 0.9996 codeword bits
per clock (99.96 Mbit/s at 100 MHz). The memory is enabled for 32 cycles per
codeword. The RCE registers change only on steps and shifts.

## Interfaces

- `aclk`, `aresetn`: one clock. Reset is active low and synchronous, and it
  empties the FIFOs and clears the accumulators.
- `s_axis_tdata[63:0]`, `s_axis_tvalid`, `s_axis_tready`: the message. One
  message is 64 consecutive words. Message bit `64w+b` is bit `b` of word `w`.
  There is no TLAST: messages are counted, not framed.
- `m_axis_tdata[63:0]`, `m_axis_tvalid`, `m_axis_tready`: the codeword, 80
  words in the same bit order. Words 0-63 repeat the message and words 64-79
  carry the parity bits. TDATA stays stable while TVALID is high and TREADY is
  low, and an assertion in `axis_master` checks this.
- `g_wr_en`, `g_wr_row[4:0]`, `g_wr_col[2:0]`, `g_wr_data[127:0]`: write the
  first row of circulant (row, col) of W. Bit `k` of `g_wr_data` is element
  `(0,k)` of the circulant. **All 256 rows must be written before the first
  message.** The CCSDS values are not built into the RTL.
- `enc_state`, `cw_done`: the current phase, and a one-cycle pulse on the last
  parity bit.

Each FIFO holds 512 words in its array, plus one word in its output register.

## Where this RTL departs from, or goes beyond, its source description

- **W contents.** The code's W comes from the CCSDS standard (131.0-B) and is
  not reproduced here. The RTL loads it through `g_wr_*`. The tests use random
  W, which exercises the same datapath. For a fixed ROM you would add an
  initial block to `gen_matrix_mem`, or load W once from a processor.
- **Generator registers.** The original design shows registers holding the
  generator bits above the AND gates. Here they are the block RAM's output
  register, not extra flip-flops. This halves the register count: synthesis
  gives 1301 flip-flop bits, close to the 1249 slice registers reported for
  the original implementation.
- **Gated clocks.** The original puts the block-RAM parts on gated clocks. Here
  they get read and write enables instead, which FPGA tools map to the RAMs'
  clock-enable pins. No clock is gated in the RTL.
- **Choices of this design**, not fixed by the source:
  - the bit order on TDATA and the parity order;
  - the circulant rotation direction;
  - FIFO depth 512, which is one RAMB36 at 64 bits;
  - the PRIME state;
  - the bit-level handshake between the stages.
- **Rate and size.** The 1-bit-per-clock rate matches the reported 99.3 Mbit/s
  measured at 100 MHz. The 136 Mbit/s maximum depends on FPGA timing, which is
  not checked here. Block-RAM and LUT counts depend on the FPGA tool.

## Verification

Each module has a self-checking testbench in `tb/`. Every one prints
`TB_RESULT checks=N failures=M` and has a watchdog.
`tb/ldpc_ref_pkg.sv` is the reference model. It computes parity straight from
the definition, XORing the rotated first row for every set message bit, and
does not use the RCE structure.

- `tb_rce`: circulant products over several block rows with idle cycles,
  parity shift-out, and chain propagation.
- `tb_encoder_core`: six codewords, including all-zero and single-one
  messages, with random stalls on both sides. It also checks the exact
  codeword latency.
- `tb_ldpc_encoder_top`: the full default size, 22 messages through AXI4-Stream.
  - Checks a codeword period of 5122 cycles at full rate.
  - Counts row reloads (31 per codeword), parity phases, back-to-back
    codewords, input starvation, output backpressure, and full slave and
    master FIFOs. A mechanism that never happens counts as a failure.
  - Checks that the memory is idle in the parity phase.
- `tb_encoder_fsm`, `tb_gen_matrix_mem`, `tb_bram_fifo`, `tb_axis_slave`,
  `tb_axis_master`: check counts, order, capacity, handshake rules and latency.

To simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_encoder_top.sv \
    --top-module tb_ldpc_encoder_top -o sim
./obj_dir/sim
```

Swap in another `tb_*.sv` to run one block's test. The top-level test takes
well under a second.

## Changing sizes

`Z` (circulant size), `NROW` and `NCOL` are parameters all the way down.
Other quasi-cyclic codes whose generator has the form `[I | circulants]` fit
without changing the RTL. The counter and address widths follow from these
parameters. The reference model in `tb/ldpc_ref_pkg.sv` has its own copy of
the sizes.
