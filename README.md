# H-Network: a collision-free parallel bus LAN for a multiprocessor

The H-Network carries packets between the nodes of a multiprocessor. Each
node has an **H-Station** that hangs on one shared, passive bus with a
separate line for every data bit and every control signal. The access rule
is a relative of CSMA/CD with one important change: a station never sends
packet data until it has *proved* that it is the only master and that every
addressed receiver has room for the packet. Collisions can therefore happen
only during the few cycles of arbitration, never during the data transfer,
and no packet is ever half sent.

Arbitration is done in three steps, each of them a few clock cycles long:

1. **Test and set** on the wired-OR line /HBUS-ACTV: a station that finds the
   network idle asserts ACTV and considers itself master.
2. **ID read-back**: two stations can win the test and set in the same
   instant. Each master puts its node number on the data lines (wired-OR) and
   reads them back. If the value is not its own number, another master is
   present; the station asserts /HBUS-COLLIS, everyone releases the bus and
   tries again once the network is idle.
3. **Destination check**: the master puts the first packet word (which
   carries the destination) on the bus and pulses /HBUS-DEST. Every station
   decides: not for me, for me and my receive FIFO is free, or for me but my
   FIFO is still full. A full receiver asserts /HBUS-COLLIS and the master
   aborts. Otherwise all stations release HBUS-DECIS and the packet is
   clocked across in one burst, one word per HBUS-DCLK pulse.

The transmit side of a station is run by a small horizontally coded
microcontroller (32 words of 16 bits), so the access algorithm is
microcode rather than wiring. The receive side is plain logic.

This repository holds synthesizable SystemVerilog for the station, the bus
and an N-station network, with self-checking testbenches.

## The bus

All lines are single-ended. Open-collector lines form a wired OR: any
station can pull them active. Tri-state lines are driven only by the
master during the data burst.

| Line | Kind | Meaning |
|---|---|---|
| /HBUS-ACTV | open collector | network in use (held by the master) |
| /HBUS-COLLIS | open collector | a collision was seen: ID clash or a full receiver |
| /HBUS-DEST | open collector | the first word on HBUS-DATA is the destination |
| HBUS-DECIS | open collector, active high | permit: high only when no station holds it low |
| HBUS-DATA[15:0] | tri-state, and open collector during the ID check | packet words; node IDs during the ID check |
| HBUS-EOP | tri-state | End Of Packet bit of the current word |
| HBUS-DCLK | tri-state | data clock: receivers take a word on its rising edge |

Inside the RTL every line is in positive logic. `hnet_bus` resolves them:
a control line is the OR of all drives, DECIS is the NOR of the
`decis_hold` drives, and the data, EOP and DCLK lines are the OR of the
enabled tri-state drivers plus the ID drivers. An undriven line reads 0. An
immediate assertion in `hnet_bus` fires if two stations ever enable their
tri-state drivers together. That is the bus rule the protocol guarantees.

## Packet format

```
word 0        { source ID [15:8], destination ID [7:0] }   destination 0 = broadcast
word 1..n-1   host data (header and body, meaning defined by the host software)
word n        checksum, with the EOP bit set
```

Both FIFOs are 17 bits wide. Bit 16 is the End Of Packet (EOP) flag. A FIFO
is 128 words deep, so the host may write at most 127 words. The station
adds the checksum word itself: it is the two's complement of the 16-bit
sum of all words the host wrote. A receiver sums every word it takes,
including the checksum. A total of zero means the packet is intact. The
receiver only reports the result; discarding the packet and asking for a
retransmission are left to the host software.

## Transmit section (`hnet_tx_module`)

The transmit section has these parts:

- **Output FIFO** (`hnet_fifo`): the host fills it.
- **Glue and checksum generator** (`hnet_tx_glue`): passes host words into
  the FIFO and appends the checksum word when the controller raises CHCLK.
- **HBUS clock** (`hnet_hbus_clock`): sends the packet.
- **Test-and-set flip-flop** (`hnet_test_set`).
- **ID compare** (`hnet_tx_idcmp`).
- **Microcontroller** (`hnet_tx_uc` with `hnet_ucode_rom`): controls the
  other parts.

### Host side

1. Wait for TX EMPTY (`tx_empty`).
2. Write the words with `host_si`/`host_d`.
3. Raise `send`, and keep it raised until the controller has left its wait
   loop. In the testbenches the host holds it for one cycle at full
   controller speed.
4. When the packet has gone, the controller clears the FIFO and the EOT flag
   and returns to its idle loop. TX EMPTY then goes high again.

`tx_empty` is high only when the FIFO is empty, EOT is low **and** the
controller's /XTCLR is high.

- Without the EOT term, a host that sees the FIFO drain might start loading
  the next packet, and the controller's final transmit clear (state 1D)
  would then wipe those new words.
- Without the /XTCLR term, a host could load words right after reset, before
  the controller's first clock. At that point the cleared instruction
  register still holds /XTCLR low, and the FIFO ignores writes. With a slow
  controller clock this window is many system clocks long.

`eot` is high only for the few cycles between the last word leaving and the
controller's transmit clear. A host should poll `tx_empty`, not `eot`.

### Microinstruction and controller timing

```
 15      14     13    12       11        10      9     8     7..5   4..0
/XTCLR  CHCLK  /XMT  TST&SET  /RELEASE  COLLIS  DEST  IDEN   CB     PC
\______________ control signal field (CSD) _______________/ branch  next
```

The ROM output is registered. The register holds the *current*
microinstruction, so its CSD bits are the control lines for this state.

On each controller clock, which is an enabled `clk` cycle (`uc_tick`):

- The address in the PC field is fetched.
- If the current instruction's CB field is not zero, bit 0 of the fetched
  word's PC field is replaced by the status input that CB selects.

CB codes: 1 /SENDA, 2 /EMPTY, 3 EOT, 4 /MASTER, 5 HACTV, 6 HCOLLIS, 7 IDOK.

A branch decided in state S therefore takes effect one state later. The
microcode is written around this delay, and it is why several ROM words
appear twice (00/01, 04/05, 10/11).

### Microcode

| Addr | Word | /XTCLR CHCLK /XMT T&S /REL COLLIS DEST IDEN | Branch on | Next |
|---|---|---|---|---|
| 00 | A023 | 1 0 1 0 0 0 0 0 | /SENDA | 03 |
| 01 | A023 | 1 0 1 0 0 0 0 0 | /SENDA | 03 |
| 02 | E804 | 1 1 1 0 1 0 0 0 | - | 04 |
| 03 | A022 | 1 0 1 0 0 0 0 0 | /SENDA | 02 |
| 04 | B887 | 1 0 1 1 1 0 0 0 | /MASTER | 07 |
| 05 | B887 | 1 0 1 1 1 0 0 0 | /MASTER | 07 |
| 07 | A808 | 1 0 1 0 1 0 0 0 | - | 08 |
| 08 | A90A | 1 0 1 0 1 0 0 1 | - | 0A |
| 09 | B887 | 1 0 1 1 1 0 0 0 | /MASTER | 07 |
| 0A | A9EB | 1 0 1 0 1 0 0 1 | IDOK | 0B |
| 0B | A90C | 1 0 1 0 1 0 0 1 | - | 0C |
| 0C | A5AF | 1 0 1 0 0 1 0 1 | HACTV | 0F |
| 0D | A9D2 | 1 0 1 0 1 0 0 1 | HCOLLIS | 12 |
| 0E | A810 | 1 0 1 0 1 0 0 0 | - | 10 |
| 0F | A5AE | 1 0 1 0 0 1 0 1 | HACTV | 0E |
| 10 | B887 | 1 0 1 1 1 0 0 0 | /MASTER | 07 |
| 11 | B887 | 1 0 1 1 1 0 0 0 | /MASTER | 07 |
| 12 | A914 | 1 0 1 0 1 0 0 1 | - | 14 |
| 14 | A816 | 1 0 1 0 1 0 0 0 | - | 16 |
| 15 | A5AF | 1 0 1 0 0 1 0 1 | HACTV | 0F |
| 16 | 8A17 | 1 0 0 0 1 0 1 0 | - | 17 |
| 17 | 88D8 | 1 0 0 0 1 0 0 0 | HCOLLIS | 18 |
| 18 | 881A | 1 0 0 0 1 0 0 0 | - | 1A |
| 1A | 887C | 1 0 0 0 1 0 0 0 | EOT | 1C |
| 1B | A5AF | 1 0 1 0 0 1 0 1 | HACTV | 0F |
| 1C | 887C | 1 0 0 0 1 0 0 0 | EOT | 1C |
| 1D | 2000 | 0 0 1 0 0 0 0 0 | - | 00 |

All other words are 0000. Read as a flow:

- **Idle, 00/01 and 03.** Loop until the host asserts SEND.
- **02.** Pulse CHCLK, which appends the checksum word. Raise /RELEASE.
- **04/05, 09, 10/11.** Test and set.
  - A station that finds the network busy moves between 07 and 09 and
    retries every two states.
  - A winner goes 07 → 08.
- **08, 0A, 0B.** Drive IDEN. The IDOK branch taken in 0A decides between
  0C and 0D.
- **0C → 0F.** ID clash: assert COLLIS, keep the ID on the bus and drop
  /RELEASE, which gives up ACTV.
  - Wait in 0F until HBUS-ACTV is released by everyone.
  - 0E then leads back to test and set (10/11).
- **0D, 12 → 14 or 15.** The ID was good. If some other station still
  asserts COLLIS, abort through 15 → 0F.
- **14, 16, 17.** Take the ID off the bus. Set /XMT low, which puts the
  FIFO head word on HBUS-DATA, and pulse DEST for one state.
- **17, 18 → 1A or 1B.** If a receiver answered with COLLIS, abort through
  1B → 0F. The packet stays in the FIFO and is retried.
- **1A, 1C.** The receivers have released DECIS. The HBUS clock runs on its
  own. Wait for EOT.
- **1D.** Clear the FIFO and EOT (/XTCLR low), release the network and
  return to idle.

At full controller speed, the DEST pulse comes 9 clocks after the state-2
cycle. The end-to-end testbench checks this.

### Test and set (`hnet_test_set`)

On the rising edge of TST&SET the ACTV flip-flop is loaded with "network was
idle". Its output drives /HBUS-ACTV, and its inverse is /MASTER. /MASTER
reflects the result in the same cycle as the test, so the controller can
branch on it in the next instruction. /RELEASE low clears the flip-flop.

If two stations test in the same clock, both win. The ID read-back sorts
this out.

### ID compare (`hnet_tx_idcmp`)

While IDEN is high, the station drives its node number onto HBUS-DATA.
IDOK is high when the low ID bits on the bus equal the node number.

Take two masters with IDs 3 and 7. Both put their IDs on the bus, which
reads 7. Station 7 reads back its own number and continues; station 3 does
not, so it asserts COLLIS. Station 7 then sees HCOLLIS in state 0D and also
aborts. Both wait for the network to go idle and start again.

The original circuit drives the inverted ID through NAND open-collector
gates. The positive-logic model drives the true ID into an OR. The two are
equivalent.

### HBUS clock (`hnet_hbus_clock`)

A free-running oscillator, a divider of `clk` with `DCLK_HALF` cycles high
and `DCLK_HALF` low, is gated by:

```
enable = /XMT low  AND  EOT low  AND  HBUS-DECIS high
```

- The enable is sampled at the start of every oscillator period, so only
  whole pulses go out.
- On each falling edge, the FIFO shifts out the next word.
- On each falling edge, the EOT flip-flop samples that word's EOP bit. After
  the checksum word has gone, EOT is set and the clock stops.
- /XTCLR clears EOT.

With `DCLK_HALF = 2`, a word takes 4 clocks. A packet of `n` words occupies
the bus for `(n-1)*4 + 1` cycles from the first rising edge of DCLK to the
last falling edge.

## Receive section (`hnet_rx_module`)

### Receive decision (`hnet_rx_decision`)

A three-bit latch holds COLLIS, DECIS and Receive Enable.

- The latch loads once, in the first clock of /HBUS-DEST. A receiver
  that starts taking words while the master still holds DEST (possible with
  a slow controller clock) therefore does not change its decision.
- It is cleared while the network is idle. Clearing holds DECIS low, which
  is why an idle network never clocks data.

A station is addressed when the destination byte is one of these:

- its node number;
- 0, which is broadcast;
- a group address its host has entered in the destination ID compare
  (`hnet_rx_idcmp`).

There are three outcomes:

| Situation | COLLIS | DECIS | Receive |
|---|---|---|---|
| not addressed | 0 | released | no |
| addressed, input FIFO free | 0 | released | yes |
| addressed, input FIFO holds a packet | asserted | held low | no |

A "FIFO used" flip-flop is set by the first word received and cleared by the
host's receive clear. An addressed receiver therefore accepts exactly one
packet per receive clear. While Receive Enable is set, every rising edge of
HBUS-DCLK writes `{EOP, DATA}` into the input FIFO.

A station's own receiver is an ordinary participant. A station therefore
receives its own broadcasts, and a packet it sends to its own number.

### Host side and checksum

The host reads the input FIFO with `host_so` while `rcvdata_n` is low
(`rx_data` reads 0 otherwise). `rx_eop` (RCVEOP) is set when the word with
the EOP bit has been read. `ck_done`/`ck_err` give the checksum result as
soon as the EOP word has arrived. `rcvclr` empties the FIFO, clears the
flags and re-arms the decision logic.

### Group addresses (`hnet_rx_idcmp`)

The destination ID compare combines a fixed comparator (own number or 0)
with a table of one bit per possible destination value. The host sets or
clears entry `grp_addr` by pulsing `grp_we` with `grp_set`. Reset empties
the table.

A packet sent to a group address reaches every station that has that
address set, in a single transfer. As with broadcast, one blocked member
blocks the whole transfer until its host clears its FIFO. The host software
must keep group addresses apart from the node numbers in use.

## The network (`hnet_system`)

`hnet_system` instantiates `N` stations and the bus. Its ports are the host
interfaces of all stations as packed arrays indexed by station, plus the
resolved bus lines for observation:

- transmit: `tx_reset`, `uc_tick`, `host_si`, `host_d`, `send`, `tx_empty`,
  `eot`, `uc_state`
- receive: `rcvclr`, `host_so`, `rcvdata_n`, `rx_data`, `rx_empty`,
  `rx_avail`, `rx_eop`, `ck_done`, `ck_err`
- group table: `grp_we`, `grp_addr`, `grp_set`
- bus: `bus`, `bus_data`, `bus_eop`, `bus_dclk`

`node_id` is an input per station. It stands for the hard-wired or
switch-set node number and must be non-zero and unique.

`uc_tick` is a per-station clock enable for the microcontroller. Tie it high
for full speed. Lower rates model a slower controller clock, or skew
between stations.

| Parameter | Default | Where it comes from |
|---|---|---|
| `DATA_W` | 16 | host word and HBUS-DATA width of the original design |
| `FIFO_DEPTH` | 128 | original design: 127 host words plus checksum |
| FIFO width | `DATA_W+1` = 17 | original design: one EOP bit |
| microcode address | 5 bits (32 words) | original design |
| `ID_W` | 8 | this implementation's choice (must be ≤ `DATA_W`) |
| `N` | 4 | this implementation's choice |
| `DCLK_HALF` | 2 | this implementation's choice (HBUS clock = clk / 4) |

## Where this RTL departs from the original circuit

The original is a TTL board design. This RTL keeps its structure, its
signals and its microcode, and makes these changes:

- **One synchronous clock.** The original mixes edges, latches and separate
  oscillators. Here, edges of CHCLK, TST&SET and HBUS-DCLK are detected on
  `clk`, and the controller advances on an enabled `clk` cycle. All resets
  are synchronous and active high.
- **Modelled parts.**
  - The FIFOs are register arrays with pointers, not cascaded FIFO chips.
  - The ROM is a case table.
  - The bus is OR logic, not open-collector and tri-state electrical lines.
- **Microcode choices.**
  - Where the printed field columns of one ROM row disagree with its hex
    word, the hex word is used: row 04 branches on /MASTER.
  - An unused location that was marked don't-care is 0000.
- **Transmit drivers gated by /XTCLR.** The tri-state data drivers are
  enabled by /XMT low *and* /XTCLR high. Reset clears the microinstruction
  register to all zeros, which makes /XMT low. Without the extra term, a
  station held in reset would drive the data bus.
- **TX EMPTY includes EOT and /XTCLR**, as described above.
- **The receive decision is taken once per packet**, in the first clock of
  DEST. This follows the original "rising edge of /HBUS-DEST" exactly. A
  latch that stayed open for the whole DEST pulse would, with a slow
  controller, see its own first received word and turn into a collision.
- **The group lookup is a one-bit-per-address register table** with a
  simple write port. The original suggests a RAM or ROM lookup with some
  host access, without details.
- **Checksum is a 16-bit two's-complement sum.** The original requires only
  that a receiver's sum over the whole packet is zero for an intact packet.

## Known properties of the protocol worth knowing

- **Receivers must see DEST within a few clocks of each other.** If one
  station still asserts COLLIS from an earlier ID clash while the master is
  in state 17, the master can see DECIS high before the last COLLIS is
  removed. The data clock could then start while another station is not yet
  ready. At full speed with equal controller clocks this does not happen.
  With large skew between stations, a receiver may miss words; the checksum
  catches this.
- **Symmetric stations can retry in lock-step forever.** Two stations with
  identical controller clocks, released at the same instant after an ID
  clash, win the next test and set together again. Real hardware breaks the
  tie through propagation delays. The end-to-end testbench models this: when
  the bus goes idle while COLLIS is asserted, one randomly chosen station
  skips a single controller clock.
- **Flow control is per packet.** A receiver that has not cleared its FIFO
  blocks every packet addressed to it, including broadcasts. The sender
  retries until the receiver is cleared.

## Not included

- The host processors.
- The node memory and the extended-bus switch to neighbouring nodes.
- The front-end and back-end units of the multiprocessor.
- The electrical line drivers and the cable.

The host signals are ports of `hnet_system`, and the testbenches play the
hosts.

## Files

| File | Contents |
|---|---|
| `rtl/hnet_pkg.sv` | microinstruction layout, branch codes, bus-line struct, default sizes |
| `rtl/hnet_fifo.sv` | FIFO used for both output and input buffers |
| `rtl/hnet_ucode_rom.sv` | transmit microcode |
| `rtl/hnet_tx_uc.sv` | microcontroller: instruction register and branch multiplexer |
| `rtl/hnet_test_set.sv` | test-and-set / ACTV flip-flop |
| `rtl/hnet_tx_idcmp.sv` | ID drive and read-back compare |
| `rtl/hnet_hbus_clock.sv` | gated data clock, shift-out and EOT |
| `rtl/hnet_tx_glue.sv` | FIFO write path and checksum generator |
| `rtl/hnet_tx_module.sv` | transmit section |
| `rtl/hnet_rx_decision.sv` | receive decision logic |
| `rtl/hnet_rx_idcmp.sv` | destination ID compare with group table |
| `rtl/hnet_rx_checksum.sv` | receive checksum check |
| `rtl/hnet_rx_module.sv` | receive section |
| `rtl/hnet_station.sv` | one H-Station |
| `rtl/hnet_bus.sv` | bus line resolution and the single-driver assertion |
| `rtl/hnet_system.sv` | top: N stations on one bus |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_hnet_lab_test.sv` | two-station transfer with a 2.17 MHz controller |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops.
Each has a watchdog. The RTL carries three assertions, active with
`--assert`:

- at most one tri-state driver on the bus (`hnet_bus`);
- no write into a full output FIFO, which would mean a host packet longer
  than 127 words (`hnet_tx_module`);
- no write into a full input FIFO (`hnet_rx_module`).

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/hnet_pkg.sv rtl/*.sv \
          tb/tb_hnet_system.sv --top-module tb_hnet_system -o sim
./obj_dir/sim
```

Replace `tb_hnet_system` with any other testbench name. All testbenches use
the default parameters and finish in seconds.

`tb_hnet_lab_test` repeats the bench test of the original hardware: one
sender and one receiver on the four-station network. The controllers run
at 2.17 MHz, a clock enable every 23rd cycle of a 50 MHz system clock,
while the data clock stays at full rate. It checks the data, the checksum,
RCVEOP and the SEND-to-DEST time of 9 controller clocks. It also measures
the data rate of a 128-word packet at 20 ns per clock. The data phase takes
511 clocks, which is 25.0 Mbyte/s. The whole transfer, from SEND to EOT,
takes 722 clocks, which is 17.7 Mbyte/s. Both are checked to be above
7 Mbyte/s, the rate the original design reached.

The end-to-end testbench `tb_hnet_system` runs the four-station network
with one host process per station:

- **Timing** of a single transfer: SEND to DEST, the number of DCLK pulses,
  and the burst length.
- **Two stations** sending in the same clock, which forces an ID clash.
- **A slow receiver** whose FIFO stays full, which forces a
  receiver-collision abort and a retry.
- **A 127-word broadcast**, the largest packet.
- **A transmit reset** in the middle of the traffic.
- **A group address** entered by two hosts, and packets sent to it.
- **Random traffic** of random lengths and destinations.

Every received packet is compared word for word with what its sender wrote,
and its checksum must be good. Every packet must arrive exactly once at
every station it is addressed to. The testbench also counts how often each
mechanism happened and fails if any never did:

- lost test and set
- ID collision
- collision after DEST
- blocked receiver
- broadcast
- group delivery
- full-length packet
- transmit clear
