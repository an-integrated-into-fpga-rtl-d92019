# FPGA-integrated optical link test system

Tuning a multi-gigabit optical link means tuning the FPGA transceiver's
output swing, pre-emphasis, equalizer and the settings of the optical modules,
until the bit error ratio (BER) is low enough. Measuring a low BER directly is
slow: showing BER < 1e-12 with 95 % confidence at 5 Gbps takes about ten
minutes for each setting. This design puts the whole test bench inside the
FPGA, next to the soft CPU that controls it:

* a pattern generator and a checker with bit and error counters, which
  together form a bit error ratio tester;
* one register block for all transceiver settings. It includes the CDR's
  eye-scan sampling offset, which moves the receiver's sampling point across
  the unit interval (UI) in 1/32 UI steps;
* an I2C master for the optical modules' management interface, and a UART
  for the operator's terminal.

Software can then measure the **eye width** instead of the BER at the best
sampling point. The eye width is the range of sampling offsets that still
reach the target BER. Near the eye edges the BER is high, so each
measurement is short. The eye width is a fast target function for
optimizing the link parameters.

Twelve duplex channels are tested with a single generator and a single
checker. The data are daisy-chained through the channels. A multiplexer picks
which channel's received data the checker sees.

## System overview

```
 CPU side (not in this RTL: soft CPU, debug unit, ROM/RAM, memory controller)
        |  AMBA AHB
  +-----v------+   APB   slot 0 0x000  uart        control terminal
  |  ahb2apb   |-------- slot 1 0x100  i2c_master  optical module management
  +------------+         slot 2 0x200  test_core   BER tester, 12-channel chain
                         slot 3 0x300  cfg_ctrl    transceiver settings, eye offset
  test_core:
    pattern_gen --> tx[0] ==(transceiver 0 + optical loopback)==> rx[0]
                    rx[0] --> tx[1] ==> rx[1] --> tx[2] ... ==> rx[11]
    rx[0..11] --> mux (channel select) --> pattern_chk --> bit / error counters
```

`olt_top` is the synthesizable top. It has these interfaces:

* an AHB-Lite slave port for the CPU's bus;
* a parallel transmit word and a parallel receive word for each of the
  `NCH = 12` transceivers;
* a settings bundle per transceiver (`xcvr_cfg_t`) with a `req`/`ack` pair;
* open-drain I2C signals (`*_oe` = pull low) and the UART pins.

One clock drives all the logic. The reset is synchronous and active low.
The word width is `DATA_W = 32`, and bit 0 of a word is the first bit on the
line. At 5 Gbps this gives a 156.25 MHz word clock.

## Measuring BER to a confidence level

Suppose N bits pass with no error. Then the BER is below `pe` with
confidence `alpha` when

    N >= N0 = ln(1 / (1 - alpha)) / pe

For 95 % confidence, N0 is 3.0e12 bits at 1e-12 (599 s at 5 Gbps) and 3.0e15
bits at 1e-15 (6.9 days). The checker has a 64-bit bit budget register
(`LIMIT`). Counting stops by itself after the first word that reaches the
budget, so software only programs N0 and waits for `done`. The bit counter
is also 64 bits wide. The error counter is 32 bits wide and saturates.

## Eye-width scan

The scan is done in software, using the registers below:

1. **Coarse scan.** Step the sampling offset over the whole UI (-16 to +16
   steps) with a small budget, which corresponds to a high target BER such
   as 1e-7. The error-free offsets give rough eye edges.
2. **Centre check.** Measure the centre between those edges with the full
   budget for the low target BER, for example 1e-12. This confirms that the
   target is reachable at all.
3. **Edge walk.** From each coarse edge, step towards the centre with the
   full budget until an offset is error free. The distance between the two
   points found is the eye width.

Each step is: write the offset to `cfg_ctrl`, issue APPLY, and wait until
`busy` clears, which happens when the transceiver has acknowledged. Then clear
the counters, start `run`, wait for `done`, and read `ERRS` and `BITS`.
Compared with a full scan at the low target BER, this skips the many
expensive measurements in the middle of the eye, which carry no
information. `tb_olt_top` runs exactly this sequence.

## Test patterns and the checker

The pattern set is PRBS7, PRBS15, PRBS23 and PRBS31, plus a low-frequency
(LF) pattern and a high-frequency (HF) pattern. The polynomials are the
ITU-T O.150 ones:

| Pattern | Polynomial or content |
|---|---|
| PRBS7 | x^7+x^6+1 |
| PRBS15 | x^15+x^14+1 |
| PRBS23 | x^23+x^18+1 |
| PRBS31 | x^31+x^28+1 |
| LF | 10 ones, then 10 zeros |
| HF | 1010... |

**One recurrence for all six.** Every pattern is a recurrence
`s[n] = s[n-A] ^ s[n-B]` over at most the last 31 bits. For LF and HF there
is only a single term: `s[n] = s[n-20]` and `s[n] = s[n-2]`. One function,
`olt_pkg::pat_step`, unrolls the recurrence `DATA_W` times. Both the
generator and the checker use it, so each holds only a 31-bit history
register.

**Lock.** The checker predicts each received word from the previous 31 bits.
While it is searching, it builds that history from the received bits, so it
re-seeds itself from the line and needs no alignment or seed exchange. After
4 consecutive error-free words it locks. From then on it runs its own copy
of the sequence, so each line error is counted once rather than once per
feedback tap. After 8 consecutive errored words it loses lock and counts a
sync loss. A change of the selected pattern also forces a new search.
All-zero and all-one words never count towards lock, because an idle or
stuck line would otherwise look like a valid PRBS.

**Counting while unlocked.** Bits and errors are counted whether or not the
checker is locked. Far outside the eye the receiver cannot follow the data
at all. The counters then show a BER close to 0.5, which is what a bath-tub
plot expects at the edges.

## Daisy chain

Channel 0 transmits the generator's word. Channel `i` transmits the word
that channel `i-1` received. Each hop has one register stage, and so does
the multiplexer output. Selecting channel `k` therefore checks the path
through channels `0..k`:

* An error on channel `j` appears in every measurement with `k >= j`.
* A single bad channel breaks the measurements of everything downstream.

To test one channel in isolation, measure it and the channel before it, and
compare. To scan the eye of channel `k` alone, keep all other channels at
the centre offset.

## Transceiver settings (`cfg_ctrl`)

`cfg_ctrl` has one set of shadow registers. Software fills it and then
issues APPLY, which copies it to the selected channel or, with the broadcast
bit, to all channels. It also raises `cfg_req` for each target channel until
that transceiver's reconfiguration logic answers `cfg_ack`. APPLY is ignored
while any request is pending.

The fields are:

| Group | Field | Width | Meaning |
|---|---|---|---|
| Transmitter | `tx_vod` | 3 | Output swing |
| Transmitter | `tx_preemp` | 5 | Pre-emphasis |
| Transmitter | `tx_vcm` | 2 | Output common mode |
| Receiver | `rx_eq` | 4 | Equalizer |
| Receiver | `rx_dfe_en` | 1 | Decision feedback equalizer enable |
| Receiver | `rx_gain` | 3 | Gain |
| Receiver | `rx_vcm` | 2 | Input common mode |
| Receiver | `rx_term` | 2 | On-chip termination |
| CDR | `eye_en` | 1 | Eye-scan offset enable |
| CDR | `eye_phase` | 6, signed | Sampling offset in 1/32 UI steps |

The field widths are placeholders. Map them to the vendor's reconfiguration
block when porting.

## Register reference

All registers are 32 bits wide and have no wait states. An unmapped offset
answers PSLVERR, which the bridge turns into an AHB ERROR response. Each AHB
access takes 4 clocks through the bridge.

The tables below give each peripheral's registers as `offset` and name.
Bits are given as `[bit]` or `[msb:lsb]`. An access type of "r/w" means the
register reads and writes differently, as described.

### test_core (slot 2)

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | CTRL | rw | [0] gen_en, [1] run, [6:4] pattern (0-3 PRBS7/15/23/31, 4 LF, 5 HF), [11:8] channel. Writing a new pattern reseeds the generator. |
| 0x04 | CMD / STATUS | r/w | Write: [0] clear counters, [1] reseed. Read: [0] locked, [1] done, [2] run. |
| 0x08 | BITS_LO | r | Bit counter, bits 31:0 |
| 0x0C | BITS_HI | r | Bit counter, bits 63:32 |
| 0x10 | ERRS | r | Error counter |
| 0x14 | LIMIT_LO | rw | Bit budget, bits 31:0. 0 means no limit. |
| 0x18 | LIMIT_HI | rw | Bit budget, bits 63:32 |
| 0x1C | SYNCLOSS | r | Lock losses since the last clear |

### cfg_ctrl (slot 3)

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | SEL | rw | [3:0] channel, [8] broadcast |
| 0x04 | TX | rw | Shadow: [2:0] vod, [7:3] pre-emphasis, [9:8] vcm |
| 0x08 | RX | rw | Shadow: [3:0] eq, [4] dfe, [7:5] gain, [9:8] vcm, [11:10] termination |
| 0x0C | EYE | rw | Shadow: [5:0] offset, [8] enable |
| 0x10 | CMD | r/w | Write [0]: APPLY. Read [0]: busy. |
| 0x14 | TX applied | r | Applied TX settings of the selected channel |
| 0x18 | RX applied | r | Applied RX settings of the selected channel |
| 0x1C | EYE applied | r | Applied EYE settings of the selected channel |

### i2c_master (slot 1)

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | PRESCALE | rw | Quarter-bit period in clocks. Reset value 125, which is 100 kHz at 50 MHz. |
| 0x04 | TXDATA | rw | Byte to write |
| 0x08 | CMD / STATUS | r/w | Write: [0] START, [1] STOP, [2] WRITE, [3] READ, [4] NACK after READ. Read: [0] busy, [1] NACK received. |
| 0x0C | RXDATA | r | Byte read |

One command word can combine START, one byte and STOP. The master honours
clock stretching by the slave.

### uart (slot 0)

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | DATA | r/w | Write: byte to send. Read: received byte, which clears rx_valid. |
| 0x04 | STATUS | r/w | Read: [0] tx busy, [1] rx_valid, [2] overrun, [3] framing error. Write 1 to bit 2 or 3 to clear that flag. |
| 0x08 | DIV | rw | Clocks per bit. Reset value 434, which is 115200 baud at 50 MHz. |

Framing is 8N1.

## What is modelled, what is not

These parts are outside this RTL:

* the soft CPU with its debug unit, boot ROM, on-chip SRAM and external
  FLASH/SRAM controller (library IP);
* the transceivers' PCS, PMA, CDR and PLLs (hard IP in the FPGA);
* the optical transmitter and receiver modules, the fibres and the
  fibre-matrix crossbar connector;
* the power-monitoring circuitry of the module carrier board.

The top brings out the buses they connect to. For simulation,
`tb/xcvr_model.sv` stands in for a transceiver with optical loopback. It
loops data back after a fixed latency, answers the reconfiguration
handshake, and flips bits with a probability set by the sampling offset:

* inside the eye (default -7 to +6 steps, about 44 % of the UI): no errors;
* d steps outside: probability 2^-max(1, 24-6d).

`tb/i2c_slave_model.sv` stands in for a module's management port.

The following are this design's own choices, not part of the original
system:

* the register maps and the APB slot map;
* `DATA_W`, the counter widths and the hardware bit budget;
* the lock and loss rules;
* the polynomials and the LF/HF contents;
* the transceiver settings bundle with its `req`/`ack` handshake, in place
  of the vendor's reconfiguration protocol.

The PLL divider and bandwidth settings of the transmitter are not included,
because they are reached only through the vendor's reconfiguration block.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. This example runs the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/olt_pkg.sv tb/tb_ref_pkg.sv \
  rtl/*.sv tb/xcvr_model.sv tb/i2c_slave_model.sv tb/tb_olt_top.sv \
  --top-module tb_olt_top -Mdir obj && ./obj/Vtb_olt_top
```

For another testbench, change the last file and `--top-module`, and add the
models it uses (`apb_slave_model.sv` for the bridge test).

| Testbench | What it covers |
|---|---|
| `tb_pattern_gen` | Every pattern against a bit-serial reference LFSR; the PRBS7 period; hold on `en` low |
| `tb_pattern_chk` | Lock, exact error counts, the bit budget (done after exactly budget/32 words), sync loss, BER of about 0.5 on random data |
| `tb_chan_chain` | Chain order, one-clock hops, every multiplexer select |
| `tb_test_core` | Twelve looped channels; errors injected on channel 4 are seen exactly on channels 4 to 11 |
| `tb_cfg_ctrl` | Fields, single and broadcast apply, the req/ack handshake and busy |
| `tb_i2c_master` | Writes, reads with repeated START, NACK for an absent address, SCL period of 4*PRESCALE, clock stretching |
| `tb_uart` | Bit timing, transmit/receive, overrun, framing error |
| `tb_ahb2apb` | Slot decoding, the 4-clock access, wait states, the ERROR response, APB signal stability |
| `tb_olt_top` | The whole system at default size: UART loopback, I2C monitoring, all patterns through the 12-channel chain, and the three-step eye scan |
| `tb_ber_threshold` | Confidence-based tests with budgets from the N0 formula; one word per clock; the register range for 1e-12 and 1e-15 |

In `tb_olt_top`, the eye scan must find the model's eye edges, -7 to +6. It
needs 6 low-BER measurements, where an exhaustive scan would need 33. Both
system testbenches run at the default parameters and take under a second.

The logic has been checked in simulation only. It has not been synthesized
for an FPGA or timed at the word clock.
