# Hybrid soft bit-flipping LDPC codec, 64-bit

This RTL protects a 64-bit data word with a low-density parity-check (LDPC)
code. It decodes the received word with a *hybrid soft bit-flipping* (HSBF)
algorithm.

Bit flipping is the cheapest kind of LDPC decoder. It takes a hard decision on
every received bit and checks the parity equations. It then inverts the one bit
that the most failing checks point at, and repeats. The "soft" part brings in
channel reliability. A bit received with a small amplitude |y| is doubtful, so
its vote gets the weight t = 1/|y|. The decoder therefore prefers to flip
doubtful bits over confident ones. The received values enter one per cycle
through a single look-up table, which serves all 24 bits of a frame in place of
a divider. Each bit then keeps only its hard decision and its weight. After that, each
iteration uses only one-bit check results and small additions and multiplies.
One iteration takes 7 clock cycles.

The 64-bit word is split into four 16-bit frames. Each frame has its own
encoder, decoder and error-check stage, and the four lanes run in parallel.

## The code

Each lane uses a systematic (24,16) binary code: 16 data bits and 8 parity bits.
The generator is G = [I16 | P] and the parity-check matrix is H = [P^T | I8].
So a codeword carries its data unchanged in bits 15:0 and its parity in bits 23:16.

| code bit | checks (rows of H) that cover it |
|---|---|
| data bit i, i = 0..7 | i and (i+1) mod 8 |
| data bit 8+i, i = 0..7 | i and (i+2) mod 8 |
| parity bit 16+m | m only |

How this H was chosen:

- **No two columns share more than one check.** This is the row-column
  constraint of Euclidean-geometry LDPC codes. On 8 checks it cannot be met by
  sixteen weight-3 columns, so the data columns have weight 2. The sixteen
  pairs form a 4-regular graph on the 8 checks, so every check covers 4 data
  bits plus its own parity bit.
- **Every single error is corrected.** With equal weights, a wrong data bit
  has a vote of +2, because both of its checks fail. Any other bit shares at
  most one of those checks, so its vote is at most +1. A wrong parity bit has
  a vote of +1, and the two data bits on its check have a vote of 0. Either
  way, the wrong bit is the unique maximum.
- **Decoding always ends on a codeword when MAX_ITER = 8.** A non-zero
  syndrome always leaves some parity bit with a positive error term. Each flip
  therefore removes at least one of the at most 8 failing checks.

Too many errors lead to a wrong codeword. The decoder cannot tell this case
apart; only the transmitted data can.

`hsbf_pkg` holds the matrix as two functions, `h_col(n)` and `h_row(m)`. To
use another code, change them, together with `N`, `K` and `M`.

## Soft input format

Each code bit arrives as a Q-bit two's-complement value y (Q = 4 by default).
It is positive for a transmitted 0 and negative for a transmitted 1, as with
BPSK mapping 0 → +1. The hard decision is the sign bit. The weight is

    t = 2^(Q-1) / |y|   (rounded down),   t = 2^(Q-1) for |y| = 0

For Q = 4, |y| = 0..8 gives t = 8, 8, 4, 2, 2, 1, 1, 1, 1. `hsbf_t_lut` builds
this table at elaboration. One instance per lane serves all bits, because a
frame is loaded one value per cycle (24 cycles, bit 0 first).

## One decoding iteration

For each bit n, the error term is

    E_n = ( sum over the checks m covering bit n of (2*S_m - 1) ) * t_n

Here S_m = 1 marks a failing check. Each failing check adds +t_n and each
passing check adds -t_n. The decoder flips the bit with the largest E_n,
taking the lowest index on a tie, but only if that E_n is positive. This is a
weighted majority vote: most of the bit's checks must fail. With this code a
positive term always exists while the syndrome is non-zero.

Each iteration runs through these states:

| cycle | state | work |
|---|---|---|
| 1 | SYN | check nodes form S = Z·H^T. Zero → done, success. Non-zero after MAX_ITER flips → done, failure. Otherwise register S. |
| 2 | ERR | the VPU computes all 24 E_n in parallel and registers them |
| 3–6 | SEL | comparison tree over 24 terms: levels 24→12→6→3→2, registered |
| 7 | FLIP | last comparison (2→1), combinational; invert z[n*] if E_n* > 0 |

One flip therefore costs 2 + clog2(24) = 7 cycles. Counted from the cycle that
delivers the 24th received value to the `done` pulse, a frame takes:

- **7F + 2 cycles** if it needs F flips, whether it ends on a zero syndrome or
  on the limit (then F = MAX_ITER).
- **7F + 8 cycles** if it stops because no error term is positive. This path
  is unreachable with this code.

The worst case at the defaults is 58 cycles per lane after the 24 load cycles.

## Blocks

Organisation: VPU and FPU exchange data in a loop; a final stage
turns the result into data and status.

| module | role |
|---|---|
| `hsbf_top` | four lanes; transmit register; waits for the slowest lane |
| `ldpc_encoder` | c = d·G, combinational |
| `hsbf_decoder` | one lane's decoder: VPU + FPU + the state machine above |
| `hsbf_vpu` | variable-node unit: holds z_n and t_n, computes E_n, flips a bit |
| `hsbf_t_lut` | hard decision and 1/\|y\| weight table, shared by the bits of a lane |
| `hsbf_fpu` | flip processing unit: check nodes (syndrome) + largest-E_n search |
| `hsbf_check_nodes` | S = w·H^T |
| `hsbf_argmax_tree` | pipelined maximum-and-index search, lowest index on ties |
| `hsbf_final` | data bits, error-detected and uncorrectable flags, count of changed bits |
| `hsbf_pkg` | code constants and H |

The VPU keeps only z_n and t_n for each bit, never |y_n|. The FPU sees the
hard decisions and the error terms, and sends back the syndrome and the index
of the bit to flip.

## Top-level interface (`hsbf_top`)

Parameters: `LANES = 4`, `Q = 4`, `MAX_ITER = 8`.

**Transmit side.** Assert `tx_valid_i` with `tx_data_i[63:0]`. One cycle later
`tx_valid_o` rises and `tx_code_o[i]` holds the codeword of frame i. Frame i is
`tx_data_i[16*i +: 16]`.

**Receive side.** The soft values come back one code bit at a time. Each cycle
in which `rx_valid_i` and `rx_ready_o` are both high carries `rx_y_i[i]`, the
value of the next code bit of frame i, starting with bit 0. All lanes load in
step, and pauses (`rx_valid_i` low) are allowed. After the 24th value the four
decoders run independently, and `rx_ready_o` stays low until all have
finished. One cycle after the slowest lane finishes, `rx_done_o` pulses
(7F + 3 cycles after the 24th value, where F is the largest flip count). These
outputs then hold until the next `rx_done_o`:

- `rx_data_o`: the 64 decoded data bits.
- Per lane, `rx_err_detected_o`: the received word failed a check.
- Per lane, `rx_uncorrectable_o`: the decoded word still fails a check, which
  only happens when the limit is hit.
- Per lane, `rx_n_flipped_o`: the number of code bits changed.
- Per lane, `rx_iter_o`: the number of flips.

The channel between the encoder and the decoder is not part of the design. The
codewords leave the chip and soft values come back, so a testbench or the
system around it applies noise and errors there.

Reset is asynchronous and active low, and clears every register.

## Which parts are fixed and which are choices

These parts follow the algorithm and organisation this design implements:

- the 64 → 4 × 16-bit frame split and the 24-bit codewords;
- the systematic G/H forms;
- the weighted error term with t = 1/|y| taken from a look-up table, and the
  serial input that lets one table serve a whole frame;
- flipping the bit with the largest error term, and iterating until the checks
  are satisfied;
- 7 cycles per iteration;
- the VPU/FPU/final-stage partition.

These are this design's own choices, and the places to look when adapting it:

- the contents of P;
- the soft-value format, Q = 4, and the weight scaling;
- MAX_ITER = 8;
- the lowest-index tie rule and the positive-term condition for a flip;
- how the 7 cycles are split between the states;
- the valid/ready/done handshake;
- the status flags of the final stage.

Not provided:

- a channel model in RTL;
- any figure for clock frequency, area or power. A decoding latency in
  nanoseconds depends on the clock of the target technology. The RTL's
  latency in cycles is the one given above.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The
reference model (`tb/hsbf_ref_pkg.sv`) writes H as literal column masks and t
as a literal table, and decodes with a plain sequential loop. It also predicts
the exact cycle count.

| testbench | what it covers |
|---|---|
| `tb_ldpc_encoder` | all 65 536 data words |
| `tb_hsbf_vpu` | serial loading in two bit orders with pauses, hard decisions, every E_n for random syndromes, flips, load priority |
| `tb_hsbf_fpu` | syndrome; argmax with many ties; result exactly 4 cycles after start |
| `tb_hsbf_decoder` | every single error corrected in one flip; 1500 random frames, loaded with random pauses, compared bit- and cycle-exactly; a second decoder with MAX_ITER = 2 to reach the limit |
| `tb_hsbf_final` | flags and counts on random word pairs |
| `tb_hsbf_top` | end to end at default parameters, 600 64-bit words |
| `tb_hsbf_top_limit` | end to end with MAX_ITER = 2: limit and uncorrectable flag |

`tb_hsbf_top` requires each of the following to happen at least once:

- a pause in the stream of received values;
- an error-free frame;
- a one-flip correction and a multi-flip correction;
- a frame where the soft weights change which bit is flipped first;
- a frame decoded to a wrong codeword;
- lanes finishing at different times.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/hsbf_pkg.sv tb/hsbf_ref_pkg.sv tb/tb_hsbf_top.sv --top-module tb_hsbf_top
    ./obj_dir/Vtb_hsbf_top

Replace `tb_hsbf_top` with any other testbench name. Each one runs in well
under a second.

Lint notes:

- Verilator reports `SYNCASYNCNET` on `rst_n`. It is used asynchronously by
  the flops and as the `disable iff` condition of the assertions; this is
  intended.
- Verilator also reports unused high bits of loop indices in the package
  functions.
