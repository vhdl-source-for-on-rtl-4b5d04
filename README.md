# tout — on-board bus to fiber-link interface

`tout` is a small interface chip that connects a board's 32-bit on-board bus
("ibus") to a point-to-point fiber link. Words written by a bus master on the
upper half of the bus are sent over the fiber as pairs of bytes; bytes arriving
from the fiber are collected in an external FIFO, paired back into 16-bit words,
decoded, and written onto the lower half of the bus. The serial work is done by
two off-the-shelf parts, a parallel-in transmitter and a parallel-out receiver
that exchange 8-bit symbols plus flags, so the chip itself only sequences bytes,
runs handshakes and decodes addresses.

Everything is written as single-clock, asynchronously reset (active-high)
state machines in SystemVerilog-2017. The design has no memories of its own; the
receive buffer is the external FIFO chip.

```
              upper ibus (id 31:16)                      lower ibus (id 15:0)
        AO_TO_PC_STROBE / AO_TO_PC_ACK              AO_FROM_PC_STROBE / AO_FROM_PC_ACK
                    |                                             ^
             +--------------+                              +--------------+
             |read_from_ibus|                              | read_from_fi |  address decode,
             +--------------+                              +--------------+  control, soft reset
              req/ack | data                          req pulse ^ | ack pulse
             +--------------+                              +--------------+
             |ibus_fo_action|                              | ibus_fi_port |
             +--------------+                              +--------------+
        fo_d, fo_ENA_l |   ^ fo_CKW = clk/2     word_ready ^ | refill
                       v   |                           +----------------+
              [fiber transmitter]                      | fifo_data_pump |
                                                       +----------------+
              [fiber receiver] --fr_d, fr_RDY_l-->  +-----------+   | fifo_READ_l
                                                    | fiber_rec |   |
                                                    +-----------+   v
                                           fifo_D, fifo_WRITE_l --> [external FIFO]
```

## Words on the link

A word is 16 bits. Bit 15 tells address words from data words. An address word
is laid out as follows (`tout_pkg::addr_word_t`):

| bits  | field      | meaning                                                   |
|-------|------------|-----------------------------------------------------------|
| 15    | is_address | 1 = address word                                          |
| 14:13 | —          | unused                                                    |
| 12    | remote     | which side of the link the word is for; compared with `I_AM_REMOTE` |
| 11:8  | chip       | chip address; compared with `MY_DATA_ADDRESS` and `MY_CTRL_ADDRESS` |
| 7:0   | sub        | sub-address; in a control transaction bit 5 = soft reset, bit 4 = loopback |

A bus transaction is normally an address word followed by a data word. The chip
itself answers to two chip addresses: a data address (default `4'b1111`) and a
control address (default `4'b0010`). The defaults configure the chip as the
*remote* end (`I_AM_REMOTE = 1`).

On the fiber each word becomes two symbols, **low byte first**. A symbol is 10
bits towards the transmitter (`fo_d[7:0]` byte, `fo_d[8]` command-symbol flag,
`fo_d[9]` force-violation flag) and 12 bits from the receiver (`fr_d[7:0]`
byte, `fr_d[8]` command-symbol flag, `fr_d[9]` code violation, `fr_d[11:10]`
unused). The chip only ever sends data symbols; command symbols (idle/fill
characters of the link) may still appear on the receive side and are thrown
away there.

## Transmit path

**read_from_ibus** takes a word from the upper bus. When the master raises
`AO_TO_PC_STROBE` the word on `id_upper` is captured and `AO_TO_PC_ACK` rises in
the next cycle. While the acknowledge is high the reader already raises its
request to the output sequencer. Once the master drops its strobe (or after 16
cycles, if it does not), the reader keeps requesting until the sequencer
acknowledges, then waits for that acknowledge to fall. The master must release
its strobe promptly: while it holds it, the request stays high and the
sequencer can send the same word a second time.

**ibus_fo_action** drives the transmitter. The transmitter's byte clock
`fo_CKW` is a flip-flop toggling every `clk` cycle, and the transmitter takes a
symbol on a rising edge of `fo_CKW` while `fo_ENA_l` is low. Because `fo_CKW`
is itself a register, it rises exactly at those `clk` edges where it was low
just before. The sequencer therefore waits, in FO_BYTE1, for a cycle in which
`fo_CKW` is high (so it falls now and rises one cycle later), and arranges that
each byte is held with the enable low across one rising edge.

Register values after each `clk` edge, for a request seen at edge e0 in the
phase where FO_BYTE1 has to wait one cycle:

| after edge       | e0    | e1    | e2    | e3    | e4    | e5    | e6    |
|------------------|-------|-------|-------|-------|-------|-------|-------|
| state            | BYTE1 | BYTE1 | WAIT1 | BYTE2 | WAIT2 | IDLE  | IDLE  |
| `fo_CKW`         | 0     | 1     | 0     | 1     | 0     | 1     | 0     |
| `fo_ENA_l`       | 1     | 0     | 0     | 0     | 0     | 1     | 1     |
| `fo_d[7:0]`      | low   | low   | low   | low   | high  | high  | high  |
| `fo_ack`         | 0     | 0     | 1     | 1     | 1     | 1     | 0     |

The transmitter takes the low byte at e3 and the high byte at e5, the rising
edges of `fo_CKW` with the enable low just before them. In the other phase
FO_BYTE1 lasts one cycle and everything happens one edge earlier.
A word takes five or six cycles from request to enable high, plus one
cycle for `fo_ack` to fall. The acknowledge rises early, as soon as the phase is
known, so that the reader has time to see it. With a bus master that starts each
write as soon as the previous one is acknowledged, one word passes every ten
cycles or so.

## Receive path

The receive path has **no back-pressure**: each stage hands on its result with
a one-cycle pulse and moves on. It keeps up with the transmit rate of the far
end, but a stage that is busy when the pulse comes misses it.

**fiber_rec** wires the receiver's byte and command flag straight to the FIFO
data pins and the receiver's active-low ready strobe straight to the FIFO write
strobe. Regenerating the strobe from `clk` would make it too short for the FIFO,
since the receiver's strobe has a 60/40 duty cycle at the byte rate. The clocked
logic around it does three things:

- It owns the FIFO reset. `fifo_reset_l` is pulled low at once (asynchronously)
  by chip reset or by a soft reset request, and is released only at the first
  clock edge that sees a ready strobe while the receiver reports a good link
  (`fr_status`) and reception is enabled. Until the link carries data the FIFO
  is held empty and whatever the receiver strobes is discarded.
- It pulses `increment_fifo_count` (top output `rx_byte_strobe`) once per
  strobe seen with a good link. Its two-state machine counts correctly as long
  as a strobe is low for at most two clock cycles.
- It counts symbols with the code-violation bit set in `violation_count`,
  cleared by reset and by a soft reset.

**fifo_data_pump** reads the FIFO, which is an asynchronous part: the oldest
byte is visible while `fifo_READ_l` is low and the FIFO advances on its rising
edge. The pump waits for the empty flag to go high, drives the read strobe low
for one cycle and samples the byte as the strobe returns high. A command symbol
is dropped and restarts the byte pairing, so command symbols can realign the
pairing. A data byte is shifted in from the top, so that after two bytes the
first sits in bits 7:0 and the second in bits 15:8. After the second byte the
pump pulses `data_pump_word_ready` for one cycle. A word needs at least six
cycles. The pump may start on the next word whenever `refill_ibus_output_buf`
or `fifo_reset_l` is high, which is nearly always. In practice the FIFO's
contents pace it, not the stages after it.

**ibus_fi_port** copies the pump's buffer when it sees the ready pulse while
idle, and offers the word to the decoder with a one-cycle `req` pulse. It then
waits up to 16 cycles for the decoder's `ack` pulse to come and to go. A ready
pulse that arrives while it waits is lost. `refill_ibus_output_buf` is low for
the one cycle after each completed offer.

**read_from_fi** decodes the word and writes it onto the lower bus:

- **Data word:** forwarded, unless a control transaction is open.
- **Address word for this side** (bit 12 equals `I_AM_REMOTE`): it first closes
  any open control transaction. If its chip field is the control address, it
  opens a new control transaction. Such a word is acknowledged but neither it
  nor the data words after it reach the bus. If bit 5 of its sub-address is
  set, it also pulses the soft reset of the receive FIFO. Every other address
  word for this side is forwarded, whether it names this chip's data address or
  another chip on the board. Both of this chip's addresses latch the sub-address
  and set `chip_selected`; any other address word clears it.
- **Address word for the other side:** never acknowledged. The port gives up
  after its 16-cycle timeout, and words that reach the port during those cycles
  are lost.

Forwarding uses a four-phase handshake. `AO_FROM_PC_STROBE` is raised, held
until `AO_FROM_PC_ACK` rises, and dropped; the decoder then waits for the
acknowledge to fall. Each wait gives up after 16 cycles. `DEBUG` mirrors the
strobe.

## Handshakes at a glance

| link                            | protocol                       | timeout |
|---------------------------------|--------------------------------|---------|
| master → read_from_ibus         | four-phase, level              | 16 cycles on the master's release |
| read_from_ibus → ibus_fo_action | four-phase, level              | 16 cycles for the acknowledge |
| ibus_fo_action → transmitter    | enable low across `fo_CKW` rise | — |
| receiver → FIFO                 | strobe passed through          | — |
| FIFO → fifo_data_pump           | read strobe, flag-guarded      | — (waits on empty) |
| fifo_data_pump → ibus_fi_port   | one-cycle pulse, no back-pressure | — |
| ibus_fi_port → read_from_fi     | one-cycle req, one-cycle ack   | 16 cycles each phase |
| read_from_fi → lower-bus slave  | four-phase, level              | 16 cycles each phase |

All timeouts share `TIMEOUT_W` (4 bits, 16 cycles).

## Parameters and pins

`tout` parameters: `I_AM_REMOTE` (1), `MY_DATA_ADDRESS` (`4'b1111`),
`MY_CTRL_ADDRESS` (`4'b0010`), `TIMEOUT_W` (4). The three address values are
fixed constants in the original chip; here they are parameters with the same
defaults.

The transceiver control pins are tied: `fo_mode`, `fo_foto`, `fr_mode` low,
`fo_ENN_l`, `fr_rf` high. `fr_ref_clk` is `fo_CKW`. The inputs `fast`, `slow`,
`in_strobe`, `fr_ckr`, `fo_RF_l`, `fifo_FULL_l` and `fifo_HALF_l` are part of
the board pinout but not used. The chip does not watch the FIFO's full flag.

The original chip has one bidirectional 32-bit bus pin group that it only ever
reads on bits 31:16 and drives on bits 15:0, with no tristate control. Here it
is split into `id_upper` (input) and `id_lower` (output). Three status outputs
not present on the original pinout make internal registers visible:
`chip_selected`, `violation_count` and `rx_byte_strobe`.

## Where this RTL makes its own choices

The state machines, their states, the timeouts, the byte order, the address
decoding and the clock-phase rule of the transmitter follow the original
design. The following are choices of this RTL:

- **Reset.** Every register has a defined reset value, normally zero or idle.
  The original leaves several registers without one, including the whole upper
  bus reader and the `fo_CKW` divider.
- **Forwarding of address words.** An address word for this side is decoded and
  then always takes the data handshake, so it is forwarded (or, for the control
  address, consumed). That is what the original state machine does as written,
  although its structure suggests a separate acknowledge-only path for address
  words. That path would be unreachable and is left out.
- **Selection flag.** `chip_selected` is set by a matching address and cleared
  by any other address word, as the chip is described to behave. The original
  state machine never sets it. It does not gate forwarding.
- **Byte strobe and violation counter.** `increment_fifo_count` is a one-cycle
  pulse per byte (the original sets it once and never clears it).
  `violation_count` counts flagged symbols (the original declares the counter
  and its input bit but never increments it). Its clear on soft reset is
  synchronous.
- **Loopback.** A control word's loopback bit is ignored and `loopback_state`
  stays 0, and reception is always enabled, as in the original remote-side
  chip.
- **Unused signals.** Unused ports of the original sub-blocks were dropped: the
  selection input of the output sequencer and the violation-count input of the
  pump.

Behaviour kept on purpose although a user should know it:

- A master that holds its strobe can get its word sent twice.
- Received words are lost when they arrive during a decoder timeout, such as
  after an address word for the other side, or when the lower-bus slave is slow
  to acknowledge.
- A soft reset empties the FIFO. A partly assembled word in the pump then pairs
  with the next byte that arrives.

## Files

| file | content |
|------|---------|
| `rtl/tout_pkg.sv` | widths, address-word struct, bit positions |
| `rtl/read_from_ibus.sv` | upper-bus reader |
| `rtl/ibus_fo_action.sv` | transmitter byte sequencer |
| `rtl/fiber_rec.sv` | receiver-to-FIFO coupling, FIFO reset, counters |
| `rtl/fifo_data_pump.sv` | FIFO reader and word assembler |
| `rtl/ibus_fi_port.sv` | word offer to the decoder |
| `rtl/read_from_fi.sv` | address decoder and lower-bus writer |
| `rtl/tout.sv` | top level |
| `tb/tb_<block>.sv` | self-checking test of each block |
| `tb/tb_tout.sv` | end-to-end test with the fiber looped back |
| `tb/ext_fifo_model.sv` | behavioural model of the asynchronous FIFO chip (simulation only) |

The RTL uses concurrent assertions for the handshake rules: single-cycle offer
and acknowledge pulses, no FIFO read while empty, a soft reset only inside a
control transaction, and the transmitter enabled only during a word.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops; a watchdog ends
a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/tout_pkg.sv tb/tb_tout.sv --top-module tb_tout
./obj_dir/Vtb_tout
```

Replace `tb_tout` with `tb_read_from_ibus`, `tb_ibus_fo_action`,
`tb_fiber_rec`, `tb_fifo_data_pump`, `tb_ibus_fi_port` or `tb_read_from_fi` for
the block tests. Lint a block with
`verilator --lint-only -Wall -Irtl -y rtl rtl/tout_pkg.sv rtl/<block>.sv`.

`tb_tout` runs the chip at its default parameters. The transmitter output is
looped back into a receiver model, which feeds the FIFO model. The test
compares everything that appears on the lower bus with a reference decoder
written from the rules above. Its scenario covers these cases:

- words lost while the link is down;
- data and address forwarding;
- chip selection;
- control transactions;
- a soft FIFO reset;
- dropped addresses for the other side;
- a word lost because it arrives while the receive side waits out the timeout of such an address;
- command symbols and a code violation injected on the fiber;
- a back-to-back burst.

The test counts each case and fails if any of them never happens. The block
tests check their timing rules cycle by cycle: acknowledge latency, pulse
widths, the 16-cycle timeouts, the two-symbol transmit sequence and the pump's
word latency.

## How far to trust it

- Every block has a self-checking test. Each test has been shown to fail on a
  deliberately broken copy of its block.
- The whole chip passes the loopback test at its default parameters.
- The transceivers and the FIFO are modelled from their pin behaviour as the
  chip uses it. They are not models of specific parts.
- The timing of real asynchronous strobes against `clk` (the receiver's ready
  strobe, the FIFO flags) is idealised in the models. In particular, the
  receiver model changes its outputs on the falling clock edge.
- The receive path depends on the far end and the lower-bus slave being fast
  enough; see the remarks on lost words above.
