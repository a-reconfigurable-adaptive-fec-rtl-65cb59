# Adaptive Reed-Solomon receiver with reconfigurable decoder arrays

A wireless link loses a varying share of its packets. Strong forward error
correction wastes bandwidth when the channel is good. Weak correction sends
too many packets back for retransmission when the channel is bad. This
receiver does both. It uses a Reed-Solomon code RS(255, 255-2t) whose
correction capability t (1 to 4 symbol errors per 255-byte packet) follows
the measured packet error rate. Packets it cannot correct are asked for
again (ARQ). The decoder hardware is rebuilt for each t: a small t gives a
small decoder, so more decoders fit in the same logic. The arrays are:

| t | code        | parallel decoders | peak throughput at 10 MHz |
|---|-------------|-------------------|---------------------------|
| 1 | RS(255,253) | 14                | 14 x 80 Mbit/s            |
| 2 | RS(255,251) | 6                 | 6 x 80 Mbit/s             |
| 3 | RS(255,249) | 4                 | 4 x 80 Mbit/s             |
| 4 | RS(255,247) | 3                 | 3 x 80 Mbit/s             |

On an FPGA, changing t means loading a different configuration, which takes
9.36 ms. The RTL here models that with four decoder banks side by side. Only
the bank for the current t is used. Decoding is suspended for
`RECONFIG_CYCLES` (93,600 cycles, i.e. 9.36 ms at 10 MHz) when t changes.

## Data flow

```
 forward channel -> received_buffer -> packet_sequencer -> decoder bank[t] -> app_* (14 lanes)
                         ^  (retx FIFO)        |                  |
                         |                     | reconf_req       +-> per_monitor -> change-t request
                         |                     v                  |
                         |             reconfig_controller        +-> control_packet_gen -> cp_* (feedback)
```

* **received_buffer**: a FIFO of 6000 packets of 255 bytes (1.53 MB). A
  packet arrives one byte per cycle with a header {seq, t, retx}. It is
  stored as one 2040-bit word. When the FIFO is full, arrivals are dropped and
  counted. Retransmitted packets go into a small separate FIFO (8 entries),
  so they do not queue behind the packets that are waiting for them.
* **packet_sequencer**: each decoder lane has a staging shift register. A
  packet is loaded into it in one cycle and shifted into the decoder one
  byte per cycle. The sequencer checks sequence numbers and counts gaps.
  While NAKed packets are outstanding, it takes no new packets from the
  buffer (the "hold"), but it serves retransmissions. When the packet at the
  head carries a t that differs from the current one, the sequencer waits
  for all lanes to drain and then requests a reconfiguration.
* **reconfig_controller**: switches `cur_t` and the lane count, and keeps
  `cfg_ready` low for `RECONFIG_CYCLES`.
* **per_monitor**: counts uncorrectable packets over a window of 64 decoded
  packets. It raises t by one at 4 or more failures and lowers it by one at
  0 failures.
* **control_packet_gen**: sends 4-byte feedback packets
  `{type, seq[15:8], seq[7:0], t}`. The type is `'A'` (ACK, packet
  decoded), `'N'` (NAK, packet uncorrectable, please resend) or `'T'`
  (change t). Each lane's events are queued, so simultaneous events from
  14 lanes are all sent.

## The decoder (`rs_decoder`)

The decoder is a five-stage pipeline. Every stage takes exactly 255 cycles,
the length of one codeword at one symbol per cycle. A new codeword can
therefore enter every 255 cycles, and each codeword leaves 4 x 255 + 1 =
1021 cycles after its first symbol went in.

| stage | module                 | work                                                        |
|-------|------------------------|-------------------------------------------------------------|
| 1     | `rs_syndrome`          | syndromes s_0..s_2t-1 by Horner's rule                      |
| 2     | `rs_matrix_solver`     | error locator polynomial from the syndrome system (Peterson) |
| 3     | `rs_chien`             | Chien search: roots of the locator = error positions        |
| 4     | `rs_matrix_solver`     | error values from the Vandermonde system                    |
| 5     | `rs_corrector`         | XOR error values into the stored codeword                   |

The codeword waits in `rs_delay_ram` (five slots of 255 bytes) while stages
1 to 4 work on it.

Code conventions:

* The field is GF(2^8) with primitive polynomial x^8+x^4+x^3+x^2+1 (0x11D).
* The generator roots are alpha^0 .. alpha^(2t-1), so s_0 = r(1) is the sum
  of the error values.
* Symbol i of the stream is the coefficient of x^(254-i).

### The matrix solver (stages 2 and 4)

This is the least conventional part. Most RS decoders use
Berlekamp-Massey. This one solves two small linear systems over GF(2^8)
directly:

* **Stage 2.** The t x t Hankel system `S * Lambda = s` gives the locator
  coefficients. The matrix rows are s_j..s_j+nu-1. If the matrix is
  singular, fewer errors occurred: nu is lowered by one and the system is
  solved again. If every size fails, the codeword is uncorrectable.
* **Stage 4.** The nu x nu Vandermonde system
  `sum_k X_k^j e_k = s_j` (j = 0..nu-1) gives the error values e_k at the
  locators X_k = alpha^p found in stage 3.

Both systems use the same unit. It has a matrix register of t x (t+1)
bytes, with the right-hand side in the last column. The unit eliminates in
place, column by column:

1. Pick a nonzero pivot (rows are swapped if needed).
2. Invert it in one cycle (`gf_inv`).
3. Normalise the pivot row.
4. Clear the column below it.
5. Back-substitute.

The elimination leaves the L and U factors in the register, and the
solution ends up in the last column.

For t = 4, the unit has one multiply-accumulate, one inverse and one
separate multiplier for the divisions. For t = 2 and 3, one multiplier
does both jobs. Stages 2 and 4 run back to back in the same 255-cycle
period. They must finish within it, and an assertion (`a_solver_in_time`)
checks this. The worst measured totals are 115 cycles (t=4), 61 (t=3) and
27 (t=2).

For t = 1, there is no matrix. The locator is lambda = s_1 / s_0. The
inverse of s_0 is found by `gf_inv_search`: an LFSR steps through alpha^j,
and a multiplier tests s_0 * alpha^j = 1. This takes at most 255 cycles.
The single error value is s_0.

### When a codeword is uncorrectable

A codeword is flagged `out_fail` in any of these cases:

* every Peterson system is singular;
* the Chien search finds a different number of roots than nu;
* the magnitude system is singular.

The data is then passed on unchanged. For t = 1, any nonzero pair of
syndromes decodes to some codeword, so a t=1 decoder never flags a failure
when s_0 and s_1 are both nonzero. This is a property of the code, not of
the RTL.

## What follows the document and what is this design's own

The document gives these parts:

* the five-stage structure and its 255-cycle stages;
* the two matrix systems and the shared solver (matrix register of
  t(t+1) bytes; separate multiplier and inverse for t=4, one-multiplier
  ALU for t=2 and 3);
* the LFSR inverse search for t=1;
* the parallelism per t (14/6/4/3);
* the 9.36 ms reconfiguration at 10 MHz;
* the 6000-packet buffer with dropping when full;
* ACK/NAK/change-t feedback;
* the block diagram: buffer, sequencer, decoder, control packet generator,
  configuration memory.

This design chooses the rest:

* the field polynomial;
* the root offset (read from the magnitude equation);
* pivoting and the one-cycle inverse in the solver;
* the codeword store;
* all handshakes and the header format;
* the control packet format;
* the separate retransmission FIFO and the hold rule in the sequencer;
* the rule that reconfiguration waits for empty lanes;
* the PER window and thresholds (the document only says PER is used as a
  threshold);
* the initial t = 4.

Differences from the document:

* **Per-decoder rate.** One symbol per clock gives 80 Mbit/s per decoder at
  10 MHz. The document quotes 78 Mbit/s.
* **Reconfiguration.** FPGA partial reconfiguration and the configuration
  memory are not modelled. All four banks exist in the RTL at once, so the
  area is the sum of the four arrays, not the largest one.
* **Out of scope.** The transmitter, the channels and the application are
  outside the design. A behavioural transmitter/channel model
  (`tb/rafec_tx_model.sv`) is used by the system testbenches. It has burst
  errors in a chosen window and a simulated round trip.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rs_pkg.sv tb/rs_tb_pkg.sv rtl/*.sv tb/tb_rs_decoder.sv \
    --top-module tb_rs_decoder
./obj_dir/Vtb_rs_decoder
```

For `tb_rafec_system`, `tb_rafec_full` and `tb_rafec_rtt`, add `tb/rafec_tx_model.sv`
before the testbench.

* `tb_rs_decoder` runs t = 1..4 with random codewords and 0..t+2 errors.
  It compares against a table-based reference (`tb/rs_tb_pkg.sv`) and
  checks the 1021-cycle latency and the 255-cycle codeword spacing.
* `tb_rafec_system` runs the whole receiver with a small buffer, a short
  reconfiguration time and a short PER window. It checks that each of
  these happens at least once:
  * ACK and NAK;
  * retransmission;
  * change of t, both up and down, and reconfiguration;
  * hold;
  * buffer overflow with drops;
  * sequence gaps.
* `tb_rafec_full` runs the top at its default parameters (6000-packet
  buffer, 93,600-cycle reconfiguration, 64-packet window) for 150 packets,
  including a burst that forces a change of t. It checks that every packet
  is delivered once and that corrected packets match what was sent.

* `tb_rafec_rtt` runs the default-size top at the heaviest operating point
  considered: 24 Mbit/s arrivals with exponential gaps and a 100 ms round
  trip (1,000,000 cycles). Each NAK holds the buffer for a full round trip.
  The buffer peaked at 1571 packets with no drops, and every packet was
  delivered once. This run takes about 15 s of simulation.

The parameters of `rafec_system` (buffer depth, reconfiguration cycles,
lanes per t, PER window and thresholds) can be changed at instantiation.
The 6000 x 2040-bit buffer dominates the memory (12.2 Mbit).
