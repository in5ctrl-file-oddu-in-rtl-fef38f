# In5Ctrl: input control FPGA for a CMS CSC DDU

A DDU (detector-dependent unit) in the CMS cathode-strip-chamber readout
collects event data from up to 15 DMBs (DAQ motherboards). Each DMB sends
its data over its own optical fiber. This RTL covers one input-control
FPGA, which serves eight of those fibers. For each fiber it:

- takes the 16-bit words from the serial receiver;
- throws away idle words and words with receive errors;
- finds the end of each DMB event from its trailer;
- pads the event to a whole number of 64-bit words;
- marks the event's last 64-bit word;
- stores the result in a block-RAM FIFO, where a read controller picks it up
  36 bits at a time.

Around this data path the FPGA keeps watch on the links. It has:

- per-fiber timeouts;
- sticky error registers;
- an L1A (Level-1 accept) counter and a bunch-crossing counter;
- a majority vote over the trailer words;
- JTAG readout of its status registers;
- fiber LEDs and a diagnostic multiplexer onto logic-analyser pins.

Version number: 23 (`in5ctrl_pkg::VERSION`).

## Data path of one fiber

```
rx_data/rx_k/rx_err ──► inunit ──18-bit half-rows──► sfifo18_36x1024 ──36-bit rows──► fifo_dout
                          ▲                               │ empty / almost_full / full
              end timeout │                               ▼
                     timeout_mon ◄── l1a           status, LEDs, JTAG
```

### Words, groups and flags

The DDU works in 64-bit words, which are four 16-bit DMB words. Inside the
FPGA one 64-bit word is a **group** of two FIFO **rows**. A row holds two
18-bit **half-rows**. Each half-row is a 16-bit word plus two flags:

| row bit | meaning                             |
|---------|-------------------------------------|
| 15:0    | first word of the row               |
| 16      | FILL: first word is padding         |
| 17      | LAST: set on the final group's first row |
| 33:18   | second word of the row              |
| 34      | FILL for the second word            |
| 35      | LAST for the second word            |

(`in5ctrl_pkg::half_t` is `{last, fill, data[15:0]}`.)

### Finding the end of an event (`inunit`)

A DMB ends its event with four trailer words whose top nibble is `E`. It
then sends idle words. An idle word is the K28.5/D16.2 pair, 0x50BC, and the
receiver marks it with the K flag. The input unit drops every K word and
every word flagged with a receive error. It counts the other words into
groups of four. The event closes when any of these happens:

- four E-code words have arrived in a row (the normal case);
- an idle word follows one or more E-codes, so a trailer word was lost or
  damaged;
- the end timeout fires while a group is open.

At the close, the open group is filled up to four words with fill words
(0xC000 with FILL set). LAST is then set on the group's first row:

- always on the row's second word (bit 35);
- also on its first word (bit 17) when the group's last row holds a fill word.

So a downstream reader sees LAST one row before the end of the event. With
one bit damaged, LAST in the two positions still tells it whether that final
row is padding.

Words wait in a 16-entry queue until their group is closed, because LAST may
still have to be added to them. Closed groups drain into the FIFO at one
half-row per clock, as long as the FIFO is not full. A word that finds the
queue full is dropped and reported on `inunit_ovfl`. Input to FIFO write
takes up to about five clocks.

### The FIFO (`sfifo18_36x1024`)

The FIFO is 1024 rows of 36 bits (2048 half-rows), written 18 bits at a
time and read 36 at a time. In the RAM the row is stored with the flag bits
in the parity positions. The package functions `row_to_bram`/`bram_to_row`
do this byte-and-parity permutation, so the read side sees the logical
layout above.

Reads are first-word-fall-through. While `empty` is low, `fifo_dout`
already holds the oldest complete row, and `oe & rd` consumes it. A row
completed at clock t is readable after clock t+1. A single odd half-row
stays invisible until its partner arrives.

An up/down counter tracks occupancy in half-rows:

| operation        | count |
|------------------|-------|
| write            | +1    |
| read             | −2    |
| write and read   | −1    |

The flags are set from this count:

- `full` at 2048 half-rows;
- `almost_full` at 2048 − 120 = 1928 half-rows (about 94%).

Writes while full are dropped.

Each fiber owns one FIFO here. The original hardware shares a pool of 22
FIFOs among its fibers, so a busy fiber can chain several; that allocator is
not included (see "Departures").

## Supervision

| block | what it does | numbers |
|-------|--------------|---------|
| `timeout_mon` (per fiber) | Start timeout: no data within a limit after an L1A. End timeout: an event that started does not end. An end timeout forces the input unit to close the event. Pending L1As are queued. | start 128 clocks (256 in calibration mode), end 18945 clocks; each strobe comes one clock after the limit |
| `sticky_err_reg` | OR-and-hold registers for receive errors, fiber-OK changes, full FIFOs, start timeouts, end-wait and end-active timeouts | cleared only by reset |
| `l1a_counter` | 24-bit L1A number; events held = L1As − events read out | almost full at 7680, full at 8192 |
| `bxn_counter` | bunch-crossing number | 0..923, cleared by BC0 |
| `fiber_led` (per fiber, 2.5 MHz clock) | FOK LED lit when the link is up, blinking when it is present but not ready, off when absent; DAV LED lit while the FIFO holds data | 2.5 MHz / 65536 = 38 Hz tick; blink toggles every 13 ticks (about 1.5 Hz) |

### Trailer vote (`special_bit_vote`)

The four trailer words of an event should be identical in their E-code bits.
The top watches the read stream of the fiber chosen by `vote_sel`. When it
reads the final group (the group whose first row carries LAST), it takes a
per-bit 2-of-4 majority over the four words and shows the result on `lvb`.
`spwd_err` pulses when the top nibble of the four copies disagrees and the
group contains no fill words.

The vote cell has two qualifiers, ANDCOM and ORCOM:

- vote = (two or more of four) AND ANDCOM, OR ORCOM;
- NOTALL = (any set) XOR (all set).

### JTAG status readout

The status registers sit on the USER2 chain. A 5-bit opcode (`jtag_op`)
selects one register through a 5-to-32 decoder (`jtag_decode`). On the DR
clock (`drck`), the register captures its status while `jshift` is low and
shifts it out LSB first while `jshift` is high. `tdo` returns the selected
register's serial output.

| opcode | register | bits |
|--------|----------|------|
| 2  | L1A number | 24 |
| 6  | fiber errors (sticky): fiber OK changed after reset | 8 |
| 7  | fiber OK | 8 |
| 13 | start timeouts (sticky) | 8 |
| 14 | end-wait timeouts (sticky): fiber idle when the timeout fired | 8 |
| 15 | end-active timeouts (sticky): fiber still sending non-idle characters | 8 |
| 17 | receive errors (sticky) | 8 |
| 21 | full FIFOs (sticky): [7:0] fibers, [8] event counter full | 12 |
| 25 | FIFO empty [7:0], event full [8], event almost full [9] | 10 |

The opcode list this follows numbers some registers twice. The assignment
above is the one that matches the registers built here.

### Diagnostic outputs (`diag_mux`)

`mode[3]` enables the multiplexers and `mode[2:0]` selects one of eight
16-bit sources for `la_out` and one of eight 8-bit sources for `led_out`.
Both outputs are registered.

| mode | la_out | led_out |
|------|--------|---------|
| 0 | receive errors, start timeouts | ~VERSION |
| 1 | end timeouts, fiber busy | receive errors |
| 2 | FIFO write, event start | start timeouts |
| 3 | event end, fill added | end timeouts |
| 4 | almost full, full | full |
| 5 | output enable, empty | almost full |
| 6 | fiber 0 FIFO word | FIFO holds data |
| 7 | fiber 0 receiver word | event full, event almost full, spwd_err |

## Files

- `rtl/in5ctrl_pkg.sv`: constants, opcodes, `half_t`, and the RAM bit
  permutation.
- `rtl/in5ctrl.sv`: the top. It has no parameters; every size is the
  default.
- `rtl/<block>.sv`: one file per block named above.
- `tb/tb_<block>.sv`: a self-checking testbench per block. Each one ends by
  printing `TB_RESULT checks=N failures=M` and has a watchdog.
- `tb/tb_in5ctrl.sv`: the end-to-end test at full size. Six live fibers, one
  absent and one not ready carry random events and deliberately damaged
  trailers. A reader checks every row. The test counts each mechanism and
  fails if one never occurred: fill, LAST, receive error, fiber-OK
  change, start timeout, end-wait and end-active timeout, FIFO almost full
  and full, vote, `spwd_err`, event almost full and full, BX wrap and BC0,
  LED blink, every JTAG register, the diagnostic mux, and input overflow.
- `tb/tb_in5ctrl_workloads.sv`: DMB events of the sizes in the table under
  "Capacity", sent on 1 to 8 fibers with the reader stopped. It checks that
  each FIFO holds the whole event, then reads it back and compares it. The
  3-CFEB event must overflow.

To simulate one testbench:

```
verilator --binary --timing --assert --top-module tb_in5ctrl -y rtl -y tb +libext+.sv \
    rtl/in5ctrl_pkg.sv tb/tb_in5ctrl.sv -o sim
./obj_dir/sim
```

The full-size end-to-end test takes about 15 s. `tb_fiber_led` shrinks the
LED prescaler (DIV=4, SHIFT=3). All other testbenches run the blocks at
their default sizes.

## Capacity

The DDU word count of an event is 6 + 25·Nts·nCFEB + 4·nDMB 64-bit words,
where Nts = 8 time samples and nCFEB is the number of cathode front-end
boards. So one DMB with k CFEBs puts 200k + 4 64-bit words through its
fiber. One fixed FIFO holds 512 of them:

| DMB event on one fiber | size | fits in one FIFO |
|------------------------|------|------------------|
| 1 CFEB | 204 | yes |
| 2 CFEB | 404 | yes |
| 3 CFEB or more | 604 or more | no |

The fitting sizes were simulated on 1, 2, 3, 4, 7 and 8 fibers at once.
Events with 11 to 15 DMBs need more fibers than the eight of one FPGA. The
DMBs beyond eight arrive at another input FPGA of the same kind.

Without the shared-FIFO pool, a fiber can hold one event only while the
reader keeps up. The largest DDU event allowed, under 30070 64-bit words,
needs far more than one FIFO per fiber.

The event counter allows 8192 outstanding events.

## Departures and choices

These follow the original design:

- the flag positions;
- the fill code 0xC… with FILL set;
- the RAM byte/parity permutation;
- the empty-flag circuit and the up/down occupancy counter;
- the timeout, threshold and bunch-crossing numbers;
- the LED rates;
- the shape of the vote cell;
- the mux widths and enables.

These are this implementation's own choices:

- **LAST rule.** The rule above reproduces the reference cases for a normal
  trailer, for 1–3 words lost or extra, and for a damaged first or second
  E-code. For a lost second or third E-word, the reference sets LAST on the
  second word only. Here it is set on both first-row words, the same as for
  a lost first E-word: the two cases leave the same pattern of three
  E-codes, and separating them would need trailer values that are not
  specified.
- **End of event.** The exact end conditions are this implementation's
  choice: four E-codes, an idle after an E-code, or an end timeout. So are
  the 16-entry input queue and the 0xC000 fill value.
- **End-wait vs end-active.** An end timeout is filed as end-active when
  the fiber's receiver shows a non-idle character at that clock, and as
  end-wait otherwise. The original names the two classes but not the rule.
- **Fiber errors.** A change of a fiber's OK status after reset is latched
  as a fiber error. The original calls such a change an error and lists a
  fiber-error register, but does not say that the two are the same.
- **Timeout clock.** The limits are counted in clocks of `clk`. The original
  quotes the start timeouts for a 25 ns clock, but its end timeout of 18945
  counts corresponds to a 12.5 ns period.
- **What is only noted.** These are only named or noted in the original
  design, so they are not built:
  - the 22-FIFO memory allocator;
  - the read controller that drains the FIFOs into the external DDU FIFO
    with header/trailer flags;
  - DMB warning/full status, the DMB error-word check and C-code status;
  - the receiver reset.

  The FIFO read ports, the L1A/BC0 inputs and the receiver outputs are top
  ports so those parts can be attached.
- **Vendor parts.** The serial transceivers, clock DLLs, configuration
  PROMs and start-up sequence are vendor parts or device configuration and
  are not modelled.
- **JTAG clock crossing.** JTAG samples the `clk`-domain status on `drck`
  without synchronisers. The values are sticky and meant to be read while
  quiet.
