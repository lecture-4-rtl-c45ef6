# ODMB slow control and self-test switches in SystemVerilog

The ODMB (optical data acquisition motherboard) collects data from up to seven
DCFEB front-end boards. Its FPGA is split into two halves. MBV is the slow-control
side: it runs from a 2.5 MHz clock and obeys the VME bus. MBC is the data side:
it runs at 40 to 160 MHz and moves event data. This RTL builds the MBV path that
turns a VME cycle into an instruction for one of the board's devices, and two of
those devices:

- the JTAG master that programs and reads back the DCFEBs;
- the monitor register that switches the board between real and dummy data, and
  between external and internal triggers.

It also builds the parts that connect those settings to the fast side:

- the clock-domain crossing circuits;
- the real/dummy multiplexers;
- one dummy DCFEB JTAG responder per DCFEB;
- the pin buffers that depend on the board version;
- the per-DCFEB error pulses.

With these, a crate controller can run the board against its own dummy devices,
with nothing connected, by writing VME registers.

The data-flow blocks are not built: packet building, FIFOs, optical links, the
other VME devices, and the dummy LVMB and ALCT/OTMB. Their signals are ports of
the top module `odmb_ucsb_v2`.

## VME instructions

Every VME access selects a board, a device and a command. The 24-bit address
(`vme_addr[23:1]`; A0 is not on the bus) splits like this:

| bits   | meaning |
|--------|---------|
| A23-19 | slot. The board answers only if this equals the inverted geographical address `~vme_ga`. |
| A18-12 | device. A18, A17 and A16 are ORed into one bit; with A15-A12 this gives a device number 0-9, decoded one-hot into `device[9:0]`. |
| A11-2  | 10-bit `command` inside the device. |

An instruction is usually written as four hex digits: device, then command×4.
So address `0x541980` is slot 21, instruction `3300`: device 3, command `0x0C0`.

`command` synchronises AS and DS into the slow clock with two flops each. It
latches the address when AS asserts and the data when DS asserts. It then raises
`strobe` while the cycle lasts, but only for this board. The device picked by
`device` acts on the rising edge of `strobe & device[n]` and answers with a
one-cycle `dtack`. `command` holds the bus DTACK (and any read data) from that
pulse until the master releases its strobes. The struct `vme_cmd_t` (in
`odmb_pkg`) carries `strobe`, `writer` (1 = read, following the active-low
`WRITE*` line), `command` and the write data to every device.

Device 3 (`vmemon`) has two one-bit settings, both readable and writable:

| instruction | setting |
|-------------|---------|
| `3300` | data multiplexer: 0 = real DCFEB data, 1 = dummy data |
| `3304` | trigger multiplexer: 0 = external L1A, 1 = internal L1A |

It acknowledges one slow-clock cycle after the strobe, because it has nothing to
wait for.

## The JTAG master (device 1)

This is the hardest part to follow, because one VME write may both move the
DCFEB's TAP controller and shift data through it. The instruction is `1Ynn`, and
the hex digit Y asks for Y+1 bits. Those bits are the low bits of the VME data
word, shifted LSB first, so one write moves between 1 and 16 bits:

| instruction | TMS before the data | TMS during the data | TMS after |
|-------------|--------------------|----------------------|-----------|
| `1Y00` data only       | none       | 0 on every bit       | none |
| `1Y04` header          | 1,0,0      | 0 on every bit       | none |
| `1Y08` tailer          | none       | 1 on the last bit    | 1,0 |
| `1Y0C` header + tailer | 1,0,0      | 1 on the last bit    | 1,0 |
| `1Y1C` instruction reg.| 1,1,0,0    | 1 on the last bit    | 1,0 |

Each header starts from Run-Test/Idle:

- The data header takes the TAP through Select-DR and Capture-DR into Shift-DR.
- The instruction header goes one state further round, into Shift-IR.

The tailer leaves the TAP as follows:

1. TMS = 1 on the last data bit takes it to Exit1.
2. It goes on to Update.
3. It returns to Run-Test/Idle.

A scan longer than 16 bits is one header-only write, then any number of
data-only writes, then a tailer-only write.

Timing, in slow-clock cycles:

- One TCK period is two cycles.
- TMS and TDI change while TCK is low.
- TDO is sampled one cycle after each TCK rising edge. Bit *i* of the data
  returns in `jtag_tdo_data[i]`.
- DTACK comes after the last TCK cycle. A `1Y0C` write therefore holds the bus
  for 2·(Y+1+5) cycles plus a few for synchronisation and acknowledge.

The master sends TCK only to the DCFEBs set in `feb_sel`. It reads TDO as the OR
of those DCFEBs' TDO lines, so select one board to read back.

After reset the dummy responders sit in Test-Logic-Reset. A header would take
them to Select-DR, not to Shift-DR. So start each session with a data-only write,
for example `W 1000` with data 0: one TCK with TMS = 0, which moves every TAP to
Run-Test/Idle. Real DCFEBs behave the same way.

The TAP controller (`jtag_tap`) is the usual 16-state machine. It advances on a
one-cycle `tck_rise` strobe, not on TCK itself, so that a block which samples TCK
with its own clock can host it.

### Dummy DCFEB responder

`dcfeb_jtag_dummy` samples TCK, TMS and TDI with the slow clock. It contains:

- a TAP controller;
- a 10-bit instruction register, which captures `...01`;
- a bypass register, selected by an all-ones instruction;
- a 16-bit user register, selected by any other instruction. It captures its own
  value and is updated at Update-DR.

TDO changes on the falling edge of TCK. These register lengths and this
behaviour are this design's own choices; the real DCFEB's registers are not
described.

## Moving settings and pulses between clocks

Four small circuits cross between the clocks. Each is built from the `fdce`
(clear) and `fdpe` (preset) flop models:

- `crossclock` moves a level, such as a multiplexer setting. It takes one flop in
  the source clock and two in the destination clock, with nothing between them.
  The output follows the input two destination edges after the first flop
  changes.
- `pulse2fast` turns a pulse from a slower clock into one cycle of a faster
  clock. It synchronises the pulse with two flops and ANDs the second with the
  inverted third.
- `pulse2slow` carries a short pulse into a slower clock. The pulse toggles a flop
  in the source clock. The toggle is synchronised, and an XOR of two successive
  synchronised values gives one cycle per pulse. Pulses must be at least two
  destination cycles apart.
- `npulse2same` stretches a pulse to N cycles in its own clock with a down-counter.
  A new pulse restarts the count.

These flops reset to 0. Where a power-on value of 1 would be used in an FPGA,
the reset value here is 0 instead. For the toggle circuit this makes the toggle
and its synchroniser agree, so no spurious pulse appears after reset.

## Self-test multiplexers and board version

The two `vmemon` settings cross into clk40 through `crossclock`. There they drive:

- one `sel_mux` per DCFEB for its 16-bit data (`dcfeb_data_real` or
  `dcfeb_data_dummy` to `dcfeb_data`);
- one `sel_mux` for L1A (`l1a_ext` or `l1a_int` to `l1a`).

A further `sel_mux` per DCFEB picks the TDO of the real DCFEB or of its dummy
responder, controlled by `gen_dcfeb_sel`. This is a top-level input, because the
instruction that sets it is not part of this design.

`dcfeb_pin_buf` handles the shared DCFEB TMS/TDI pins. ODMB version 2 boards
(`odmb_id[15:12] == 2`) receive TMS/TDI on those pins. Later versions drive them.
The pad's driver enable is `dcfeb_jtag_oe`, and the value read from the pin comes
back as `odmb_tms`/`odmb_tdi`. The pad cells belong in the board-level wrapper.

## Bad-DCFEB pulses

`bad_dcfeb_pulse` raises a 160 MHz pulse for each DCFEB when either of these
happens, unless that DCFEB is in `kill`:

- it reports a packet that is too long;
- its fiber error flag rises (registered twice, with edge detection).

With `IS_SIMULATION = 1` the fiber term is removed. Each pulse is carried to
clk40 with `pulse2slow`, for the error counters (`bad_dcfeb_pulse`). It is also
stretched to 50 cycles at 160 MHz with `npulse2same`, to reset that DCFEB's
FIFOs (`bad_dcfeb_pulse_long`).

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `odmb_ucsb_v2`, `odmb_vme`, `cfebjtag`, `bad_dcfeb_pulse` | `NFEB` | 7 | number of DCFEBs |
| `odmb_ucsb_v2`, `bad_dcfeb_pulse` | `IS_SIMULATION` | 0 | 1 removes the fiber-error term |
| `bad_dcfeb_pulse` | `LONG_PULSE` | 50 | length of the FIFO reset pulse, clk160 cycles |
| `npulse2same` | `CNT_W` | 16 | width of the pulse-length counter |
| `dcfeb_jtag_dummy` | `IR_LEN`, `DR_LEN` | 10, 16 | dummy register lengths |
| `sel_mux` | `WIDTH` | 1 | data width |

`reset` is one active-high asynchronous clear for all three clock domains.

## Where this departs from the original firmware

- Only VME devices 1 and 3 exist. Any other device number is decoded, but
  nothing answers, so the bus never gets a DTACK.
- The original entity has a `NREGS` generic that nothing here uses. It also has
  VME lines (AM, GAP, SYSFAIL, BERR, IACK, LWORD) whose use is not described.
  All of these are left out.
- VMEMON's acknowledge originally clocks a flop with the strobe itself. Here it
  is a synchronous edge detector with the same one-cycle result.
- Tri-state pins are split into separate in, out and enable ports.
- The instruction-register scan `1Y1C` follows the board's usual instruction
  set. The data-scan instructions `1Y00` to `1Y0C` are the core of the original
  description; `1Y1C` was added so that the instruction register can be reached.
- The following are this design's own choices, not the original firmware:
  - the header and tailer lengths;
  - reading Y as Y+1 bits;
  - the two-cycle TCK;
  - DTACK after the scan;
  - `feb_sel` and `gen_dcfeb_sel` as ports;
  - the dummy DCFEB's registers.
- Read instructions for the JTAG master, and invalid instructions, are not
  acknowledged.

## Files and simulation

`rtl/` holds one module or package per file. `odmb_pkg.sv` holds the shared
types: the instruction struct, device numbers and TAP states. `tb/` holds one
self-checking testbench per module, `tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_odmb_ucsb_v2` runs the top at its default parameters and exercises every
mechanism:

- VME writes and reads to both devices;
- a write to another slot, which must be ignored;
- the multiplexer switches in both directions;
- JTAG header/data/tailer and instruction scans against the dummy responders,
  with read-back;
- board-version pin directions;
- bad-DCFEB pulses, with and without `kill`.

It counts how often each mechanism happened, and counts a failure for any that
never happened.

To run any testbench with Verilator:

```
verilator --binary --timing -Wall -Wno-fatal -Irtl -y rtl +libext+.sv \
    --top-module tb_odmb_ucsb_v2 rtl/odmb_pkg.sv tb/tb_odmb_ucsb_v2.sv
./obj_dir/Vtb_odmb_ucsb_v2
```

Replace the testbench name to run another. The testbenches take well under a
second each. Assertions in `command`, `cfebjtag` and `odmb_vme` check that:

- at most one device is selected;
- DTACK pulses last one cycle;
- TMS/TDI never change while TCK is high;
- two devices never acknowledge at once.
