# B-Timizer readout logic

The B-Timizer is a small front-end board for drift-time measurement in the
LHCb Outer Tracker. One 32-channel TDC digitizes the hits. The board must hold
every event the first-level trigger (L0) keeps until the second-level trigger
(L1) decides about it, up to about 2 ms later. Accepted events then go out
over a serial link. This repository holds the SystemVerilog for the board's
FPGA, which does all of that except the time digitizing:

```
 L0 trigger ──► L0 derandomizer ──► Write Control ◄── TDC readout (32-bit words)
                                       │  (merge, length limit, test data, header)
                                       ▼
 L0 Pointer ─► Buffer occupation   Multiplexer ◄──► 256K x 36 ZBT SRAM (L1 buffer)
 L1 Pointer ─┘                         ▲
                                       │
 TTC Channel B ─► broadcast decoder ─► L1 FIFO ─► Read Control ─► DS-link serializer
                  (Hamming correction)               │ (ID check, trailer, Errors word)
                                                     └──► JTAG Event data register
 JTAG (TCK/TMS/TDI/TDO) ─► emulated TAP ─► Command / ID / offset / error / version registers
```

The L1 buffer is an external single-port SRAM with 4096 event slots of 64
words each. An event is written into the slot named by the **L0 Pointer**. It
is later read from the slot named by the **L1 Pointer**. Each L1 decision
advances the L1 Pointer, so slot order and trigger order always match. This
is the key to the design: the only per-event state kept outside the SRAM is
the slot number in the 16-entry L1 FIFO.

## Clocking

The whole design runs on one 80 MHz clock, which is twice the 40 MHz LHC
clock. The Multiplexer toggles a phase bit every clock and splits each 40 MHz
cycle into two slots:

| phase | SRAM slot | also used as |
|---|---|---|
| 0 | write (Write Control) | |
| 1 | read (Read Control) | `ce40`: samples the TDC handshake, the L0 trigger and the Channel B bit |

L0 triggers and Channel B bits must therefore be held for one 40 MHz period
(two clocks). The serializer runs at one bit per clock (80 Mb/s) or one bit per
two clocks (40 Mb/s). The JTAG port is not clocked by TCK. Instead, TCK, TMS
and TDI are oversampled through two-flop synchronizers, so TCK must stay below
about a quarter of 80 MHz.

`rst_n` is the power-up reset. The data path has a second, synchronous reset
(`sreset`), raised by either source:
- the L1 reset broadcast;
- the Rst bit of the Command register.

`sreset` clears the pointers, the FIFOs, the state machines and the sticky
error flags. Rst also drives the `tdc_reset` output. The bunch-count and
event-count reset broadcasts are passed on to the TDC as `tdc_bunch_reset` and
`tdc_event_reset`, each one 40 MHz cycle long.

## Event slot layout

The Write Control fills slot `p` (word address `p*64 + i`) in this order:

| word | content |
|---|---|
| `+1` | TDC header |
| `+2 ...` | TDC hit words, or merged pairs of hits when MergEn is set |
| next | TDC trailer |
| next ... | 0 .. N test words (`1100` + walking one), N random up to the TestId maximum |
| `+0`, written last | B-Timizer header |

The header is written last because it carries the word count and the flags,
which are known only at the end. After the header the L0 Pointer and the L0
event-ID counter advance.

Each word is 36 bits in the SRAM. The Multiplexer adds four even parity bits,
one per byte, on writes and checks them on reads.

### Word formats (bits 31:28 give the type)

| word | 31:28 | 27:24 | 23:12 | 11:8 | 7:0 |
|---|---|---|---|---|---|
| B-Timizer header | `1010` | ID[3:0] | L0 event ID | flags: Empty, L1 FIFO full, L0 FIFO full, Event overflow | word count |
| merged data | `0100` | `1`, coarse error, hit B ... | hit B: channel 25:21, coarse[2:0] 20:18, fine[7:3] 17:13 | hit A: channel 12:8, coarse[2:0] 7:5, fine[7:3] 4:0 | |
| test data | `1100` | walking one | | | |
| B-Timizer trailer | `1101` | ID[3:0] | event ID | Error detected, Parity error, L1 FIFO full, ID/broadcast error | ID[11:4] |
| Errors word | `1001` | ID[3:0] | 23:20 `0000`, 19:16 data parity errors, 15:12 header parity errors | 9:0 error flags | |

The word count includes both headers and both trailers but not the Errors
word. `btim_pkg.sv` holds these layouts as packed structs.

## Writing events

- **Length limit (MaxEvt)**: at most 7, 15, 31 or 61 data words are stored.
  The remaining hits are read from the TDC and dropped, and the header's
  Event-overflow bit is set. With 61 hits, the TDC header, the TDC trailer and
  the B-Timizer header, a slot is exactly full. Test data is clamped so that a
  slot never exceeds 64 words.
- **Merging (MergEn)**: two hits are packed into one word. Each hit keeps:
  - its channel;
  - the 3 low bits of its coarse time;
  - the 5 high bits of its fine time.

  The coarse-error bit is set when a hit's dropped coarse bits (10:3) differ
  from those of the event's first hit. A hit left over at the end of an event
  goes alone into the lower half of the word.
- **Buffer full**: the buffer is full when L0 Pointer − L1 Pointer = 4095; one
  slot always stays free. A TDC event that arrives while the buffer is full is
  read and dropped, and a 6-bit memory-full counter counts it. When space
  returns, one **empty event** is written per counted event, before any newer
  event. An empty event is a header with the Empty flag set. This keeps slot
  numbers in step with the L1 trigger sequence. If the counter would pass 63,
  the sticky L1-buffer-overflow flag is set instead.
- **Disabled (Ena = 0)**: the TDC is not read. Each L0 trigger gives a header
  with the Empty flag, followed by test words. With TestId = 4 there are always
  63 test words, which makes a fixed-size test record.
- The header's L1-FIFO-full flag is the FIFO watermark at the time the header
  is written.

## Trigger and broadcast path

Channel B frames are received one bit per 40 MHz cycle:

```
idle 1 | start 0 | format 0 | cmd[7:0] | check[4:0] | stop
```

- **Check bits 0–3** are a Hamming code over the command:
  - p0 covers bits 7, 6, 4, 3, 1;
  - p1 covers bits 7, 5, 4, 2, 1;
  - p2 covers bits 6, 5, 4, 0;
  - p3 covers bits 3, 2, 1, 0.
- **Check bit 4** is the even parity of the command.
- **Single errors** are corrected. A single error in a check bit leaves the
  command intact.
- **Other errors**: every other syndrome pattern drops the command. It also
  pulses the broadcast-parity error and latches the uncorrectable-error flag
  until `sreset`.
- **Undetected double errors**: bit 4 covers only the command bits. Some pairs
  of command-bit errors therefore look like a single check-bit error and pass
  unnoticed. This is a property of the code itself.
- **Long frames** (format bit 1) are skipped.

The meaning of the command byte is this design's own choice:

| cmd[7:6] | meaning |
|---|---|
| `01` | L1 decision: bit 5 = 1 accept / 0 reject, bits 1:0 = event ID LSBs |
| `00` | resets: bit 0 = bunch-count reset, bit 1 = event-count reset (reloads the L0 event ID from the offset), bit 2 = L1 reset |

Every L1 decision advances the L1 Pointer. An accept also pushes
`{L1 Pointer, ID, overflow}` into the **L1 FIFO**, which is 16 deep. Its
watermark flag is set at 12 entries or more. The flag goes into the next
headers written, and it is also an error flag. At 15 entries a sticky
overflow flag is set.

The **L0 derandomizer** only needs to count pending triggers, since the TDC
buffers the data itself. It is a counter with a depth of 16 and a full mark
of 12; its overflow flag is sticky.

## Reading events

For every L1 FIFO entry the Read Control does the following:

1. Reads the header.
2. Compares the event ID's two LSBs with the TTC ID.
3. Reads words 1 .. count−2 of the slot. If the header carries the
   L1-FIFO-full flag, it reads no more words, so that the FIFO drains quickly.
4. Sends each word on.
5. Appends the trailer.
6. If any error was seen, appends the Errors word.

Errors word flags 9:0:

| bit | flag |
|---|---|
| 9 | broadcast error |
| 8 | L1 FIFO overflow |
| 7 | L1 FIFO full |
| 6 | event-ID mismatch |
| 5 | L1 buffer overflow |
| 4 | L0 FIFO overflow |
| 3 | Empty |
| 2 | L1 buffer full: an empty event while Ena is set |
| 1 | L0 FIFO full |
| 0 | Event overflow |

Words go to the **DS-link serializer**, or to the JTAG Event data register when
JtagRo is set. The serializer sends each word as a 35-bit frame, MSB first:

```
start = 1 | bit 31 ... bit 0 | even parity | stop = 0
```

It uses Data/Strobe encoding: the strobe toggles whenever the data does not.

## JTAG registers

The IR is 4 bits. Capture-IR loads `0001` and Test-Logic-Reset selects Bypass.

| IR | register |
|---|---|
| `0000` / `0001` | Command register, bit-wise reset / set; capture reads it |
| `0010` | 12-bit board ID |
| `0011` | 12-bit event-ID offset, loaded into the event counter on reset |
| `0100` | 12 error flags, latched; cleared when captured |
| `0101` | version code (parameter `VERSION`, default 1) |
| `0110` | 32-bit Event data |
| others | bypass |

With JtagRo set, the Event data register takes one word whenever it holds zero
and is cleared when read, so a non-zero read is a valid word. With JtagRo
clear it holds the last word sent to the serializer. Clear it with one read
after switching JtagRo on.

Command register bits:

| bit | name |
|---|---|
| 0 | Rst |
| 1 | Ena |
| 2 | SclkSel (1 = 80 Mb/s) |
| 4:3 | MaxEvt |
| 7:5 | TestId |
| 8 | JtagRo |
| 9 | MergEn |

Error flags 11:0:

| bit | flag |
|---|---|
| 11 | uncorrectable broadcast |
| 10 | data parity |
| 9 | header parity |
| 8 | broadcast parity |
| 7 | L1 FIFO overflow |
| 6 | L1 FIFO full |
| 5 | event-ID error |
| 4 | L1 buffer overflow |
| 3 | L0 FIFO overflow |
| 2 | L1 buffer full |
| 1 | L0 FIFO full |
| 0 | event overflow |

TDO changes on the falling TCK edge. Shifting is LSB first. As in IEEE
1149.1, capture happens on the rising TCK edge that leaves a Capture state,
and update happens on the falling TCK edge inside an Update state.

## Where this design makes its own choices

Beyond the block structure, formats and numbers of the original board, the
following are this design's own choices:

- **Broadcast command encoding** (above) and the skip length of long frames.
- **TDC readout handshake**: `tdc_valid` / `tdc_get`, one word per 40 MHz
  cycle. The hit layout used is {`0100`, TDC id, channel 23:19, coarse 18:8,
  fine 7:0}.
- **SRAM timing**: flow-through ZBT. The address is registered, write data
  follows one clock later, and read data comes one clock later. A pipelined
  ZBT part would need one more cycle in `buffer_mux`.
- **Test data**: the random count comes from an 8-bit LFSR, and the content is
  a walking one.
- **Empty events**: the replay order, and the meaning of "L1 buffer full" in
  the Errors word.
- **Parity fields**: the "parity" fields of the Errors word are per-byte
  parity-error indicators, so zero means no error.
- **Coarse error**: the reference is the first hit of the event.
- **L0 derandomizer**: its depth and full mark.
- **Test points**: `test_mem_write`, `test_mem_read` and `test_error` show the
  write and read strobes and the OR of all error flags.

Limits worth knowing:
- The buffer takes one write per 40 MHz cycle. At a 1 MHz L0 rate, events must
  therefore average fewer than about 37 data words.
- The SRAM bus is brought out as separate in / out / enable pins. A board-level
  tristate buffer must join them.

## Files and simulation

`rtl/` holds one module per file:

| file | block |
|---|---|
| `btimizer_top` | the top |
| `btim_pkg` | shared package |
| `l0_derandomizer` | L0 derandomizer |
| `event_pointer` | L0 and L1 Pointers |
| `l1_buffer_occupation` | buffer occupation |
| `hit_merger` | hit merging |
| `write_control` | Write Control |
| `l1_fifo` | L1 FIFO |
| `read_control` | Read Control |
| `buffer_mux` | Multiplexer |
| `ds_serializer` | DS-link serializer |
| `ttc_chb_decoder` | Channel B decoder |
| `jtag_tap` | emulated TAP |
| `jtag_regs` | JTAG registers |

`tb/` holds two behavioural models, `zbt_sram_model` and `hptdc_model`. The
TDC model produces events with a known, computable hit pattern. There is also
one self-checking testbench per block, `tb_<block>.sv`, which prints
`TB_RESULT checks=N failures=M`.

`tb_btimizer_top` runs the complete design at full size (4096 slots):
- JTAG configuration;
- events at both serial rates, with L1 rejects in between;
- merging, MaxEvt overflow and test data;
- an event-ID mismatch;
- a corrected and an uncorrectable broadcast;
- bunch-count and event-count resets passed to the TDC;
- an injected SRAM parity error;
- the L1 FIFO watermark giving short events;
- readout through JTAG;
- Ena = 0 records;
- filling all 4096 slots until the buffer is full, then replaying the dropped
  events as empty events;
- more than 63 dropped events (L1 buffer overflow);
- L1 FIFO overflow;
- L0 derandomizer full and overflow.

The testbench watches the design only at its ports, except for one bit it
flips inside the SRAM model to cause a parity error.

It compares every output word with the expected event and fails if any of
these mechanisms never occurred.

`tb_workload_l1_latency` runs the board's design point:
- 4000 random L0 triggers at an average rate of 1 MHz;
- every L1 decision sent 2 ms after its trigger;
- one event in 25 accepted.

About 2000 events wait in the buffer at a time, and the testbench checks that
no error flag is raised.

Run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/btim_pkg.sv tb/tb_btimizer_top.sv --top tb_btimizer_top -Mdir obj
./obj/Vtb_btimizer_top
```

The top-level run finishes in a few seconds of wall time.
