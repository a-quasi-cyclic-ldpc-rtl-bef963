# QC-LDPC encoder–channel–decoder for IEEE 802.11n (648-bit, rate 1/2)

This RTL is a complete, self-contained link for the IEEE 802.11n rate-1/2 LDPC
code with 648-bit codewords. A 324-bit message is encoded, optionally hit by a
single bit error, turned into soft values, decoded by min-sum message passing,
and shifted out serially. A ten-state Moore controller sequences the steps. A
read-out block shows any 24-bit slice of the codeword, or any 12-bit slice of
the decoded message, on six seven-segment digits, the way the design is checked
on an FPGA board.

```
            read1        start                  init1/read2          init2/enable_dec     load/enable
              |            |                        |                      |                   |
 msg_in --> input_mem --> ldpc_encoder --648--> channel --27 LLR/beat--> ldpc_decoder --324--> piso --> decoded
  (324)        (324)       enc_done ^        flip, flip_number  stop1 ^      dec_done ^       stop2 ^
                                     \________________ control_unit (Moore FSM) ______________/
                         codeword, msg_dec --> readout_display --> packet, hex[5:0]
```

## The code

The parity-check matrix H (324 × 648) is made of a 12 × 24 grid of 27 × 27
sub-blocks. A sub-block is either all zero or an identity matrix rotated by a
shift s: row k of the sub-block has its one in column (k + s) mod 27. The shift
table (`BASE` in `rtl/qc_ldpc_pkg.sv`) is the one the IEEE 802.11n standard
defines for this length and rate. Columns 0–11 carry the message and columns
12–23 the parity.

Bit numbering is the same in every module. Vector bit i is the (i+1)-th bit in
transmission order, so bit 0 is sent first. Sub-block c covers bits 27c … 27c+26.
The read-out prints each packet with its first bit in the most significant
position.

The parity half of H has the standard's *dual-diagonal* form. Parity column 0
has shifts 1, 0, 1 in rows 0, 6, 11. Below it is a staircase of unshifted
identities. This structure is what makes encoding cheap.

## Encoder (`ldpc_encoder`)

The encoder does not use a dense generator matrix. It uses the structure of H
in three pipeline stages:

1. **λ_r** = Σ_c P^BASE[r][c] · m_c over the 12 message sub-blocks, for each of
   the 12 block rows. Each term is a rotated 27-bit word, so this is only
   wiring plus XOR.
2. **p₀** = λ₀ ⊕ … ⊕ λ₁₁. When all rows are added, the staircase cancels and
   the three shifts in parity column 0 add up to the identity.
3. **p₁** = λ₀ ⊕ P¹p₀, then **p_{r+1}** = λ_r ⊕ p_r ⊕ P^BASE[r][12] p₀ for
   r = 1…10. This is a running sum down the staircase, and p₀ enters only at
   row 6.

Each stage is registered. A message can therefore be started every cycle, and
its codeword appears 3 cycles after `start`. `enc_done` follows the latest
`start` and stays high until the next one.

## Channel (`channel`)

When `init` (init1) is asserted, the channel stores the codeword. If `flip` is
set, it inverts bit `flip_number`. Each bit becomes a signed 5-bit LLR: received
0 gives +MAG and received 1 gives −MAG, with MAG = 8 by default. `flip_number`
is 5 bits wide, so only bits 0–31 of the codeword can be hit. While `read`
(read2) is high, the frame goes to the decoder as 24 beats of 27 LLRs, with a
block index and a valid strobe. `stop` (stop1) rises with the last beat.

## Decoder (`ldpc_decoder`) — the core of the design

The decoder is a fully parallel, flooding-schedule min-sum decoder. It has one
processing node per variable (648) and per check (324), and one stored message
per edge (88 non-zero sub-blocks × 27 = 2376 edges). Each clock cycle performs a
complete iteration:

* **Variable nodes.** sum_v = λ_v + Σ c2v over the edges of v (9-bit). The hard
  decision is the sign of sum_v.
* **Edges.** v2c_e = sum_v − c2v_e, saturated to ±15. This removes the edge's
  own contribution.
* **Check nodes.** The node finds the smallest (min1) and second-smallest
  (min2) |v2c| among its 7 or 8 edges, plus the XOR of their signs. Each edge
  gets back min1 (min2 if it is the edge that supplied min1). Its sign is the
  product of the other edges' signs.
* **Stopping rule.** In the same cycle, all 324 parity checks are evaluated on
  the current hard decision. If they all hold, the decoder latches the message
  bits and raises `done` and `parity_ok`. Otherwise it stores the new c2v
  messages and runs the next iteration. After `MAX_ITER` (default 10)
  iterations it stops anyway, with `parity_ok` low.

Timing: an error-free frame finishes in the first enabled cycle, with 0
iterations. A frame that needs i iterations raises `done` i + 1 cycles after
`enable` is first seen. `init` (init2) clears the messages and `done`. Lambda
beats may arrive in any block order.

Because the channel gives every bit the same magnitude, the first iteration
behaves like a majority vote. A wrong bit of column degree d ≥ 2 hears d
correct-sign messages against its own single LLR. The testbench shows that
every one of the 648 single-bit error positions is corrected. Random double
errors were also corrected in every trial.

## Controller (`control_unit`)

The controller is a Moore machine: its outputs are decoded from the state
alone. Reset is asynchronous and puts it in `accept_msg`.

| state | output(s) | leaves when |
|---|---|---|
| accept_msg | – | data_read |
| read_msg | read1 | next cycle |
| start_enc | start | next cycle |
| encoding | – | enc_done |
| channel | – | channel_rdy |
| init_mag | init1, init2 | next cycle |
| read_mag | read2 | stop1 |
| decoding | enable_dec | dec_done |
| load_piso | load | next cycle |
| enable_piso | enable | stop2 → accept_msg |

The done/stop signals from the blocks are levels. Each is cleared by the strobe
that starts its step, so a stale level from the previous run is never seen.

## Output (`piso`, `readout_display`)

`piso` loads the 324 decoded bits. It then sends bit 1 first, one bit per
enabled cycle, with `serial_valid`. `stop` (stop2) rises with bit 324.

`readout_display` takes a 5-bit address and selects packet `addr`:

* codeword mode: a 24-bit packet, shown on all six digits;
* decoded-message mode (`show_dec`): a 12-bit packet, shown on the three
  right-hand digits.

Addresses 27–31 blank the display. Segments are active low, a–g on bits 0–6.
For the stored demonstration message, address 8 shows `0F b7C2` and address 23
shows `64 6768`.

## Timing of a whole run

Assume data_read and channel_rdy are already high. One message then spends
360 + i cycles outside `accept_msg`, where i is the number of decoder
iterations:

* read, start and encode: 1 + 1 + 3
* channel and init: 1 + 1
* frame transfer: 25
* decoding: i + 2
* load: 1
* serial output: 325

Serial output dominates. The datapath itself (encoder 3 cycles, decoder i + 1
cycles) is short.

## Sizes and parameters

| parameter | default | where |
|---|---|---|
| Z, codeword, message | 27, 648, 324 | `qc_ldpc_pkg` |
| LLR width | 5 bits (sign + 4-bit magnitude) | `qc_ldpc_pkg` |
| MAG (channel LLR magnitude) | 8 | `channel` |
| FLIP_W (flip_number width) | 5 | `channel` |
| MAX_ITER | 10 | `ldpc_decoder` |
| INIT_MSG_MSB_FIRST (reset message) | demonstration message | `input_mem` |

The prototype matrix is fixed to the 648-bit code. Other 802.11n lengths would
need their own `BASE` table and Z.

## What is this design's own choice

The block set, its wiring, the control sequence, the 4-bit LLR magnitude, the
5-bit error position and the packet read-out follow the source description.
The following were not specified there and are choices made here:

* the IEEE 802.11n shift table and bit order. The read-out values of the
  demonstration codeword satisfy every check of H in this order, and the
  encoder reproduces all 27 packets exactly;
* the three-stage encoder pipeline;
* plain min-sum, without normalisation or offset, and the flooding schedule
  at one iteration per cycle;
* MAX_ITER = 10 and the LLR magnitude 8;
* the frame transfer of 27 LLRs per beat;
* init2 asserted together with init1 in `init_mag`;
* the message write port on `input_mem`;
* the status outputs (`parity_ok`, `iter_count`, `serial_valid`,
  `decoded_valid`), the display select and the blanking rules.

Known departures and gaps:

* **decoding → load_piso.** The transition is taken on `dec_done`. The state
  diagram labels this arrow `data_read`; the written description
  of the state (waiting for the decoder's acknowledge) is followed.
* **`select` input.** A `select` input appears on the decoder and controller in
  the reference schematic, with no described function. It is not implemented.
* **`data_msg` output.** The top-level output of that name is likewise
  undescribed. The packet read-out is brought out instead.
* **Published figures not reproduced.** A latency of 64 cycles and throughputs
  of 25–41 Gbit/s were reported for FPGA implementations, without saying what
  they measure. This design's cycle counts are given above. Its FPGA resource
  use and clock rate have not been measured.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

* `tb_ref_pkg` is the reference. It expands H, inverts its parity part by
  Gauss–Jordan elimination over GF(2), and encodes by matrix multiplication.
  This is independent of the encoder's dual-diagonal method. It also holds the
  27 demonstration packets.
* `tb_ldpc_encoder` checks the demonstration codeword packet by packet, 40
  random messages against the reference, the 3-cycle latency and
  back-to-back operation.
* `tb_ldpc_decoder` checks:
  * error-free frames (hard and random soft magnitudes);
  * all 648 single errors in the demonstration codeword, plus 60 more in
    random codewords;
  * double errors;
  * a random frame that must give up after exactly MAX_ITER iterations;
  * enable pauses.
* `tb_channel`, `tb_piso`, `tb_control_unit`, `tb_input_mem` and
  `tb_readout_display` check their handshakes and cycle counts.
  `tb_control_unit` compares the FSM against a reference model under random
  inputs.
* `tb_enc_channel_dec` runs the whole system at its default parameters:
  * the demonstration message without error;
  * with an error at each of the 32 reachable positions;
  * 12 random messages with random waits.

  It checks the serial output, both read-out modes and the exact run length.
  It also counts that each mechanism occurred: message write, idle wait,
  encoder wait, channel wait, error injection, correction, error-free
  decoding, serial output and display.

The RTL also carries concurrent assertions for its interface rules. They are
active when simulating with `--assert`:

* the controller never raises two step strobes at once;
* the decoder is not written or re-initialised while it iterates, and beats
  address a valid sub-block;
* the PISO never sees load and enable together.

To simulate, for example, the whole system:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_enc_channel_dec \
    rtl/qc_ldpc_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_enc_channel_dec.sv -o sim
./obj_dir/sim
```

For any other testbench, replace `tb_enc_channel_dec` with its name. All
testbenches finish in seconds.
