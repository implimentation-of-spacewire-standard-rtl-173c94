# SpaceWire codec in SystemVerilog

SpaceWire is a full-duplex, point-to-point serial link for spacecraft
electronics. Each direction uses two signals, Data and Strobe: Data carries the
bits, and Strobe toggles whenever Data does not. So exactly one of the two
changes per bit, and the receiver gets its clock back as `D xor S`. This codec
sits between a host (a sensor, a mass memory, a data-handling computer) and such
a link. It turns the host's bytes and end-of-packet markers into SpaceWire
characters, brings the link up and keeps it up, applies credit-based flow
control so that the receiver is never overrun, and carries time-codes for
system-wide time distribution.

The design follows a paper describing a VHDL SpaceWire codec built along the
lines of the ECSS-E-ST-50-12C standard. The block structure, the character
formats, the link state machine and the timeouts come from that description.
Where it only names a block, the standard's behaviour or a simple choice of this
design fills the gap. The section "Where this design departs or chooses" lists
each such point.

## Block structure

```
             host side                                    line side
 host_tx ──► spw_host_if ──► spw_fifo (tx) ──┐
                                              │   spw_link
 host_rx ◄── spw_host_if ◄── spw_fifo (rx) ◄─┤   ┌───────────────────────────────────┐
                                              ├──►│ spw_tx_clock ─► spw_transmitter ──┼──► dout, sout
 host time ◄─► spw_time_if ◄─────────────────┘   │        ▲  credit, FCT request    │
                                                  │ spw_timer ◄─► spw_state_machine   │
                                                  │        ▼  got*/errors           │
                                                  │ spw_rx_clock_recovery ─► spw_receiver ◄── din, sin
                                                  └───────────────────────────────────┘
```

| module | role |
|---|---|
| `spw_codec` | top level: link, the two FIFOs, host interface, time interface |
| `spw_link` | the link interface: wires the six link blocks together and raises FCT requests |
| `spw_transmitter` | picks the next character, adds parity, shifts it out with data-strobe encoding, counts transmit credit |
| `spw_tx_clock` | bit-rate clock enable: 10 Mb/s during start-up, one of eight rates in Run |
| `spw_rx_clock_recovery` | synchronises D and S, turns each change of `D xor S` into a bit strobe, brings out `D xor S` as `rx_clock` |
| `spw_receiver` | aligns on the first NULL, decodes characters, checks parity and escapes, counts receive credit, writes N-Chars |
| `spw_state_machine` | link start-up and error recovery (six states) |
| `spw_timer` | 6.4 us and 12.8 us timeouts, 850 ns disconnect timeout |
| `spw_fifo` | synchronous FIFO, used as transmit buffer and as receive buffer |
| `spw_host_if` | valid/ready host streams with one register stage each way |
| `spw_time_if` | local time counter: master ticks and received time-codes |
| `spw_ddr_out` | behavioural model of a DDR output register, used only with the DDR transmit option |
| `spw_pkg` | shared types: link states, control codes, `nchar_t`, `link_ctrl_t` |

Everything runs on one clock, `clk` (the system clock), with a synchronous,
active-high `rst`.

## Characters on the line

Every character starts with a parity bit P and a flag (1 = control, 0 = data).
The left-most bit goes first:

| character | bits on the line |
|---|---|
| FCT | `P 1 0 0` |
| EOP (normal end of packet) | `P 1 0 1` |
| EEP (error end of packet) | `P 1 1 0` |
| ESC | `P 1 1 1` |
| data | `P 0 d0 d1 … d7` |
| NULL = ESC + FCT | `P 1 1 1 0 1 0 0` |
| time-code = ESC + data | `P 1 1 1 1 0 t0 … t5 f0 f1` |

Parity is odd. It covers the data bits of the *previous* character, the parity
bit itself and the flag of the current one, so `P = 1 ^ parity(previous data bits) ^ flag`.
The receiver therefore finds a corrupted character only when the next one
arrives.

In a time-code, bits t0…t5 are the 6-bit time and f0, f1 the two control
flags.

Host-side N-Chars (data bytes and packet ends) are 9 bits wide (`nchar_t`):
`ctrl` plus `data[7:0]`. With `ctrl` set, `data[0]` = 0 means EOP and 1 means
EEP. A packet is any run of data bytes ended by EOP or EEP. The first bytes are
the destination address; the codec does not look at them.

## Link start-up and error recovery

`spw_state_machine` has the six states of the SpaceWire exchange level. Each
row below is a state; the "to ErrorReset on" column gives the events that send
it back to ErrorReset.

| state | transmitter | receiver | leaves to | to ErrorReset on |
|---|---|---|---|---|
| ErrorReset | reset | reset | ErrorWait after 6.4 us | — |
| ErrorWait | reset | on | Ready after 12.8 us | error, FCT, N-Char, time-code |
| Ready | reset | on | Started when the link is enabled | error, FCT, N-Char, time-code |
| Started | NULLs | on | Connecting on a NULL | error, FCT, N-Char, time-code, 12.8 us |
| Connecting | FCTs, NULLs | on | Run on an FCT | error, N-Char, time-code, 12.8 us |
| Run | everything | on | — | error, credit error, link disabled |

"Link enabled" means `link_disable` is low and either `link_start` is high, or
`autostart` is high and a NULL has been received. So one end is usually started
actively and the other waits for it. The timer restarts on every state change,
so each timeout counts from entry into its state.

The practical effect is that a link recovers by itself. Any error makes the end
that sees it go silent for 19.2 us (6.4 + 12.8). The silence makes the other
end see a disconnect, which makes it reset too. Then both start again with
NULLs, exchange FCTs and return to Run. The end-to-end test takes a link
through this sequence after a cut line, a flipped bit and a disabled end.

Error sources:
- **parity error**: a character whose parity check fails;
- **escape error**: ESC followed by ESC, EOP or EEP;
- **disconnect**: no new bit within 850 ns of the last one, counted in
  `spw_timer` once a first bit has arrived;
- **credit error**: an N-Char arriving with no credit outstanding, or FCTs
  pushing the transmit credit above 56.

If the receiver is shut off in the middle of a packet, it writes an EEP into
the receive buffer. The host then sees that packet marked as cut short by a
link error.

## Flow control

Each FCT sent permits the other end to send 8 more N-Chars.

- **Transmit side**: the transmitter keeps its own credit. Each received FCT
  adds 8 and each N-Char sent takes 1. At zero credit the N-Chars wait in the
  transmit FIFO, and the host sees `host_tx_ready` fall once that FIFO is full.
- **Receive side**: `spw_link` asks for an FCT while the receive FIFO's free
  space covers the credit already granted plus 8 more, and that credit stays
  within 56. An N-Char the receiver is writing in that very clock counts as
  already stored, because the FIFO's free count only drops one clock later. So
  the far end can never send more than the receive FIFO can hold.

With the default 64-entry receive FIFO, up to 7 FCTs (56 N-Chars) can be
outstanding. A host that stops reading stalls the far end's host within a few
characters, and nothing is lost.

When several characters are waiting, the transmitter sends them in this order of
priority: time-code, FCT, N-Char, NULL. NULLs fill the line whenever nothing
else may be sent, which keeps the link alive and lets the far end detect a
disconnect.

## Clocks, bit rates and the receiver

The design is built for a system clock between 10 and 200 MHz. The default
assumes 200 MHz:

- `INIT_DIV` (default 20) must equal the system clock divided by 10 MHz. It
  sets the 10 Mb/s start-up bit rate and the 100 ns tick of the 6.4/12.8 us
  timers. The 850 ns disconnect limit is rounded up to whole clocks (170 at
  200 MHz).
- In Run, `tx_speed` (3 bits) selects one of eight transmit dividers from
  `SPEED_DIV`. The default table `'{20,16,10,8,5,4,2,1}` gives 10, 12.5, 20,
  25, 40, 50, 100 and 200 Mb/s at 200 MHz. The rate can change while the link
  runs.
- The transmitter is a clock-enabled shift register on the system clock. The
  TX clock block is a divider that produces one enable pulse per bit.
- **Double data rate (`TX_DDR = 1`).** D and S leave through a DDR output cell
  that drives one value in the high half of the clock and another in the low
  half. The TX clock divider then counts half clocks. It gives two enables,
  one for a bit starting in each half of the next clock, so a clock carries
  zero, one or two new bits. The transmitter computes both half-clock line
  values in each clock. Every rate doubles: the start-up divider becomes
  2 x `INIT_DIV` half clocks, still 10 Mb/s, and Run divider 1 is 400 Mb/s at
  200 MHz. `spw_ddr_out` only models the cell; on an FPGA, replace it with the
  vendor's DDR output primitive, which has the same four ports. With
  `TX_DDR = 0` (the default) the cell is left out.

The receiver also runs on the system clock. D and S pass through two-stage
synchronisers. Each change of the synchronised `D xor S` becomes one bit
strobe, three clocks after the change on the line. The recovered clock itself
is only brought out on `rx_clock`. This keeps the whole codec in one clock
domain, at a price: every received bit must last at least one system clock, and
with an unrelated far-end clock, in practice about 1.5 clocks. At 200 MHz
that means up to roughly 130 Mb/s from an independent transmitter. Two codecs on
the same clock, as in the test, work up to 200 Mb/s. The DDR option speeds up
transmission only. A codec can send at 400 Mb/s but cannot receive at that rate.

## Time distribution

`spw_time_if` keeps the 6-bit time and 2 control flags.

- **Time master**: a pulse on `host_tick` increments the time and sends it as a
  time-code. The transmitter only sends time-codes in Run and drops ticks
  outside it.
- **Time slave**: a received time-code is always loaded. If it equals the local
  time plus one, `host_tick_out` pulses; otherwise `time_err` pulses.

## Host interface

The host interface is two valid/ready streams of `nchar_t`:

- **Transmit**: `host_tx_valid`, `host_tx_data`, `host_tx_ready`.
- **Receive**: `host_rx_valid`, `host_rx_data`, `host_rx_ready`.

A word moves when valid and ready are both high at a clock edge. `host_rx_data`
holds its value while `host_rx_valid` is high and `host_rx_ready` is low (there
is an assertion for this). Each direction has one cycle of latency and can carry
one word per clock.

## Where this design departs or chooses

- **Single clock domain.** The original codec clocks its receiver with the
  recovered clock. This one oversamples D and S on the system clock instead, at
  the rate cost described above.
- **Synchronous FIFOs.** The original FIFOs are device-specific and decouple a
  host clock from the link. Here they are generic register-array FIFOs on the
  one clock. Put a dual-clock FIFO in `spw_codec` if the host needs its own
  clock.
- **DDR output.** The original uses a device-specific DDR output cell and says
  no more about it. The half-clock divider and the two enables are this
  design's own way to drive such a cell, and `spw_ddr_out` is a model of it,
  not a cell.
- **Choices of this design, not given by the original:**
  - the eight bit rates;
  - the FIFO depth (64);
  - the host N-Char format;
  - the valid/ready host protocol;
  - automatic FCT requests driven by the buffer fill level;
  - the time-code sequence check;
  - synchronous reset;
  - the extra status outputs `rx_error`, `credit_err` and `time_err`.
- **Taken from the SpaceWire standard:** the maximum credit of 56, the
  character priority, NULL alignment, escape errors, the "link enabled"
  condition and EEP insertion.
- **Not built:** the LVDS drivers and receivers, connector and cable (no
  logic). Also not built is the transmitter's discarding of the rest of a packet
  after a link error (not described). After an error, the bytes of an
  interrupted packet still in the transmit FIFO are sent once the link is back,
  and arrive as the start of a new packet.
- **Stray characters when a link drops.** An end that drops its link forces D
  and S low at once, possibly in the middle of a character. At the other end
  that last edge can complete a valid control character, typically an EEP,
  just before that end sees the disconnect. Hosts should accept an EEP that
  arrives between packets.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `INIT_DIV` | codec, link, timer, tx_clock | 20 | system clock / 10 MHz |
| `SPEED_DIV[8]` | codec, link, tx_clock | `'{20,16,10,8,5,4,2,1}` | Run-state dividers selected by `tx_speed` |
| `FIFO_DEPTH` | codec | 64 | depth of both FIFOs; keep ≥ 56 so the full credit fits |
| `TX_DDR` / `DDR` | codec, link / transmitter, tx_clock | 0 | 1 selects the double-data-rate transmit output |
| `WIDTH`, `DEPTH` | fifo | 9, 64 | FIFO word width and depth |

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_spw_codec` | two codecs back to back at default parameters. It covers: start-up time (Run no sooner than 19.2 us; 21.2 us observed); packets both ways at 10 Mb/s and after switching among five other rates; a host that stops reading (flow control stalls the sender, nothing lost); 70 time-codes; a cut line mid-packet (disconnect, EEP, recovery); a single flipped bit (parity error, recovery); a disabled end. Every received N-Char is compared with a scoreboard, and each mechanism must occur at least once. |
| `tb_spw_codec_ddr` | the same back-to-back setup with `TX_DDR = 1` on both codecs. It covers: start-up at 10 Mb/s; traffic at four Run rates up to 200 Mb/s; flow control; a cut line and recovery. |
| `tb_spw_transmitter_ddr` | the DDR transmit path, bit clock and output cells included, at 400, 200 and 80 Mb/s and at the start-up rate. Both clock edges are sampled. It checks: the data-strobe rule; even bit spacing in half clocks; the decoded character stream. |
| `tb_spw_ddr_out` | the DDR cell model: which input appears in each half of the clock. |
| `tb_spw_link` | one link against a far end written in the testbench. It checks: silence for 19.2 us; NULLs at 20 clocks per bit; the 12.8 us give-up in Started; Connecting and Run; exactly 8 N-Chars per FCT; a credit error from a misbehaving far end; disconnect detection 170 clocks after the last bit. |
| `tb_spw_transmitter` | an independent bit-level decoder checks: the data-strobe rule; parity; NULLs, FCTs, N-Chars and time-codes; credit limits; time-codes overtaking waiting data. |
| `tb_spw_receiver` | characters built bit by bit in the testbench check: alignment; every event output; credit; parity and escape errors; disconnect; EEP insertion. |
| `tb_spw_state_machine` | every arc of the state table above, plus the output enables. |
| `tb_spw_timer`, `tb_spw_tx_clock`, `tb_spw_rx_clock_recovery`, `tb_spw_fifo`, `tb_spw_host_if`, `tb_spw_time_if` | exact cycle counts, bit recovery at 1 to 7 clocks per bit, random FIFO and stream traffic against queue models, time counter rules. |

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/spw_pkg.sv tb/tb_spw_codec.sv --top-module tb_spw_codec -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_spw_codec` with any other testbench name. The end-to-end test
simulates about 0.4 ms of link time in under a second.
