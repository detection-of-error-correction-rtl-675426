# SEC code with fast decoding of control bits, and a 256-bit double-error corrector

Packet-processing hardware often stores a wide data word (64 to 256 bits)
together with a few control bits, such as start-of-packet (SOP),
end-of-packet (EOP) and an error mark (ERR). Everything kept in RAM must be
protected by an error-correcting code. Usually a single-error-correcting
(SEC) code is used.

The control bits are awkward. They decide what happens to the data, so they
sit on the critical timing path, typically into a framing state machine.
With an ordinary SEC code over data and control bits together, correcting
one control bit means computing the whole syndrome over about 270 bits and
comparing all of it with that bit's column. A separate SEC code for the
control bits would be fast, but it costs extra check bits.

This design keeps one SEC code with the minimum number of check bits, and
arranges its parity-check matrix so that each control bit can be corrected
from a small part of the syndrome. For 256 data bits and 3 control bits,
that part is 3 of the 9 syndrome bits. Those 3 bits are computed over only
the bits that feed them.

The repository holds two designs that sit side by side in the top level
`ecc_top`:

1. **The SEC code and a packet buffer that uses it** (`pkt_ecc_buffer`):
   encoder, RAM, decoder with the fast control-bit path, and a framing state
   machine.
2. **A comparison-based double-error corrector for 256-bit words**
   (`top_256`, four `edc64` slices). It corrects two flipped bits per 64-bit
   slice, but it needs the word as sent as well as the word as received.

## How the check matrix is built

Call the number of data bits d, control bits c and check bits p. The p
check bits are split into two groups:

- **p_cd shared bits**, syndrome bits `s1..s_pcd`
  (`syndrome[P_CD-1:0]`). They cover both data and control bits.
- **p_d data-only bits**, `syndrome[P_CD+P_D-1:P_CD]`. They cover data bits
  only.

Each bit's parity-check column is a (shared value, data-only value) pair.
The columns follow these rules:

- **Control bit k**: a shared value v_k of weight at least 2, and a
  data-only part of zero. Weight 1 is not allowed, because that column
  would equal a check bit's own unit column. The c control bits use the c
  smallest such values. For p_cd = 3 these are `011`, `101` and `110`, so
  control bit 0 (SOP) is flagged by `s1 & s2 & ~s3`.
- **Data bits**: every other shared value is used. That means zero, the
  p_cd weight-one values, and any weight-2-or-more value no control bit
  took (here `111`). Each is combined with every p_d-bit data-only value.
  Combinations whose total weight is below 2 are left out. Data bits take
  these columns in ascending (shared, data-only) order.

Because no data column and no check-bit column carries a control bit's
shared value, a single error is in control bit k exactly when the shared
syndrome equals v_k. The data-only syndrome does not need to be looked at.
Data bits whose shared value is zero do not feed the shared check bits at
all. For 256 data bits that is 57 of them, so the partial-syndrome XOR tree
is smaller than the full one.

The construction protects at most

    (2^p_cd - c) * 2^p_d - (p_d + 1) - p_cd

data bits. The -(p_d + 1) removes shared value zero combined with a
data-only value of weight 0 or 1. The -p_cd removes the weight-one shared
values combined with data-only zero. The smallest p_cd that works, for the
same total number of check bits:

| control bits c | 128 data bits (p = 8) | 256 data bits (p = 9) |
|---|---|---|
| 3 | 3 | 3 |
| 4 | 4 | 4 |
| 5 | 4 | 4 |
| 6 | 4 | 4 |
| 7 | 4 | 4 |
| 8 | 5 | 5 |

The configurations this code is meant for:

| d | c | p_cd | p_d | room for data bits |
|---|---|---|---|---|
| 64 | 3 | 3 | 4 | 72 |
| 128 | 3 | 3 | 5 | 151 |
| 256 | 3 | 3 | 6 | 310 (default) |

All columns are worked out during elaboration by functions in
`sec_code_pkg`, so there is no stored table. `sec_code_pkg::min_p_cd`
returns the smallest p_cd for a given d, c and p. If the chosen sizes cannot
hold the data, elaboration stops with an error.

## Decoding: the fast path and the full path

`sec_decoder` runs two paths side by side:

- **Full path.** A second `sec_encoder` recomputes all check bits from the
  received data and control bits. The syndrome is that result XOR the
  received check bits. Data bit j is inverted when the syndrome equals its
  column.
- **Fast path** (`ctrl_fast_decoder`). It recomputes only the shared check
  bits, over the control bits and the data bits with a non-zero shared
  value. Control bit k is inverted when that 3-bit partial syndrome equals
  v_k. One equality compare of p_cd bits drives each control output.

For any single error, in data, control or check bits, both paths return the
original word. The decoder also reports:

- `err_o`: the syndrome is non-zero.
- `uncorrectable_o`: the syndrome is non-zero but matches no column.
- `ctrl_flip_o`: which control bits the fast path inverted.

**Multiple errors need care.** This is a SEC code, so a double error can
look like a single error and be miscorrected. The fast path adds one more
case: it sees only the shared syndrome. A double error that the full
syndrome flags as uncorrectable can still have a shared part equal to some
v_k. The fast path then inverts that control bit. This is the cost of not
waiting for the full syndrome. Logic that uses the markers should treat
`uncorrectable_o` as overriding them.

## The packet buffer (`pkt_ecc_buffer`)

    wr_data, wr_ctrl --> sec_encoder --> {chk, ctrl, data} --> packet_ram (FIFO)
                                                                    |
                                                              rd_word (registered)
                                                                    |
                                          +------------- sec_decoder -------------+
                                          | data: full syndrome                   | markers: fast path
                                          v                                       v
                                    data register  <----  packet_fsm (state register, framing)

- **Write side.** `wr_valid`/`wr_ready`, where ready means not full. A word
  and its markers are encoded and stored as one 268-bit codeword.
- **Read side.** `rd_en` pops the oldest word; it is ignored when `empty`.
  The word appears on `out_*` two clock edges after the edge that accepts
  `rd_en`: one for the RAM read register, one for the data and state
  registers. `ecc_corrected` and `ecc_uncorrectable` are aligned with
  `out_valid`.
- **Markers.** They are packed as `pkt_pkg::pkt_ctrl_t`, with
  `{err, eop, sop}` in bits `{2, 1, 0}`.

`packet_fsm` has two states, `S_IDLE` (between packets) and `S_IN_PKT`:

- EOP closes a packet, and the next word always starts the next one. A
  single-word packet carries SOP and EOP together.
- A first word without SOP raises `frame_err` for that word. So does an SOP
  inside a packet, which is then taken as a new start.
- If any word of a packet carried ERR, `pkt_drop` is raised with the
  packet's last word, telling the consumer to discard the packet.

All resets are synchronous. The memory array is not reset; its pointers
and all output registers are.

## The double-error corrector (`edc64`, `top_256`)

This corrector works from two words: A, the word as sent, and B, the word as
received. P = A xor B has a 1 at every wrong bit. The pairs of P are
scanned in the order (p0,p1), (p0,p2), ..., (p0,p63), (p1,p2), and so on.
At the first pair where both bits are 1, those two bits of B are inverted.
The first such pair in that order is always the lowest and second-lowest
set bits of P. `edc64` is therefore built as a two-deep priority search,
not as a scan over 2016 pairs.

What it does in each case:

| flipped bits in the slice | `y_o` | `err_o` | `cor_o` |
|---|---|---|---|
| 0 | B (= A) | 0 | 0 |
| 1 | B (not corrected: no pair exists) | 1 | 0 |
| 2 | A | 1 | 1 |
| 3 or more | B with its two lowest wrong bits fixed | 1 | 1 |

`top_256` puts four slices side by side: generate block `m[0]` takes bits
63:0, up to `m[3]` for bits 255:192. Two errors can be corrected in each
quarter. The outputs are registered: one clock edge from inputs to outputs,
with a synchronous active-high reset.

This scheme only makes sense where the sent word is available at the
checking point, for example when comparing a replica against a reference.
It is not a code: no redundancy is stored with the data.

## Files

| file | what it is |
|---|---|
| `rtl/sec_code_pkg.sv` | column construction, capacity and minimum-p_cd functions |
| `rtl/sec_encoder.sv` | check-bit generation |
| `rtl/ctrl_fast_decoder.sv` | partial syndrome and control-bit correction |
| `rtl/sec_decoder.sv` | full syndrome, data correction, fast control path, flags |
| `rtl/pkt_pkg.sv` | marker struct and framing states |
| `rtl/packet_ram.sv` | FIFO memory for codewords |
| `rtl/packet_fsm.sv` | framing state machine and data register |
| `rtl/pkt_ecc_buffer.sv` | encoder, RAM, decoder and framing put together |
| `rtl/edc64.sv` | 64-bit comparison-based double-error corrector |
| `rtl/top_256.sv` | four `edc64` slices |
| `rtl/ecc_top.sv` | top level: `pkt_ecc_buffer` (ports `pb_*`) beside `top_256` (ports `dc_*`) |

Main parameters and their defaults:
- `DATA_W` = 256 data bits.
- `CTRL_W` = 3 control bits, fixed by `pkt_ctrl_t` in the buffer.
- `P_CD` = 3 shared check bits.
- `P_D` = 6 data-only check bits.
- `DEPTH` = 16 buffer words.
- `SLICES` = 4 and `SLICE_W` = 64 for the corrector.

For 64-bit data use `P_D = 4`; for 128-bit data use `P_D = 5`.

## Simulating

Every testbench in `tb/` checks its own results. It ends by printing
`TB_RESULT checks=N failures=M`. With plain Verilator 5, from the
repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/sec_code_pkg.sv rtl/pkt_pkg.sv tb/tb_ecc_top.sv \
        --top-module tb_ecc_top -o sim
    ./obj_dir/sim

Swap in another testbench name to run a different test:

- `tb_sec_encoder`: reads back all columns and checks the SEC and
  fast-decoding rules, without reusing the construction code.
- `tb_ctrl_fast_decoder`, `tb_sec_decoder`: no error and every single error
  at every position, plus random double errors.
- `tb_packet_ram`, `tb_packet_fsm`: block tests against a queue model and a
  packet-list model.
- `tb_pkt_ecc_buffer`: the buffer at 64 data bits and 4 words.
- `tb_edc64`, `tb_top_256`: 0 to 3 flipped bits per slice.
- `tb_ecc_top`: the whole design at its default parameters. It injects
  single errors into data, marker and check bits of stored words, and
  double errors chosen to be uncorrectable. It also forces the buffer full
  and empty, and covers dropped packets, framing faults and every
  corrector case. It counts each mechanism and fails if one never happened.
- `tb_code_configs`: the 64/128/256-bit configurations and every row of
  the minimum-p_cd table above, with exhaustive single-error correction.
  It also checks that each row fits with the tabulated p_cd and not with
  one fewer. It elaborates 13 code instances and takes a few minutes to
  build.

Errors are injected into the buffer by writing directly into the RAM array
from the testbench (`dut.u_pb.u_ram.mem`). The design has no error-injection
port.

## What is this design's own choice

The code construction and the corrector follow the method described above.
The following were left open, and were settled here:

- the order of the data columns and which weight-2+ values the control
  bits use;
- the codeword bit order `{check, control, data}`;
- the FIFO organisation and its 16-word depth, the handshakes, and the
  two-edge read latency;
- the framing rules for missing or extra SOP markers, and reporting the drop
  decision with the packet's last word;
- the `err_o`, `uncorrectable_o`, `ctrl_flip_o` and `cor_o` flags;
- the register stage and reset polarity of `edc64`, and the mapping of
  quarters to slices.

Not included:

- A BCH-based double-error-correcting decoder (syndromes S1 and S3,
  Berlekamp, Chien search). It appears only as coding background. The
  corrector built here is the comparison-based one.
- The plain SEC code over data and control bits, and the separate
  data/control SEC codes. These are only points of comparison for the
  fast-decoding code.
- Area and delay figures from FPGA synthesis. They are not reproduced; the
  RTL targets no particular technology.
