# USB control path of the DHCAL DIF FPGA

The DIF (detector interface board) of the DHCAL calorimeter prototype is
controlled from a PC over USB. On the board, an FTDI FT245B chip turns USB
into a simple 8-bit parallel FIFO. This RTL is the FPGA side of that link. It
turns the byte stream from the PC into two kinds of operation:

- **32-bit register accesses.** The PC reads and writes a small register file:
  identification, control, monitoring and slow-control status.
- **Commands.** The PC asks for slow-control loading, acquisition start,
  external RAM-full or trigger signals, or a data readout. The FPGA reports
  when each command has finished.

All logic runs on the board's 40 MHz clock and uses an asynchronous,
active-high reset.

```
 FT245B  <-->  usb_interface  --Rx_data/usb_strobe-->  rw_fsm  --USB_add/data-->  usb_register
 (USB)         (rx + tx FSMs) <--usb_write_ask/tx_data--+       --USB_CMD-->  cmd_decoder --orders--> rest of DIF
                     ^                                  |                        |  <--end signals--
                     |                           tx_source_mux <-- faux_ro <-- RO_cmd
                     +-------- rx_ready / writing ------+
```

## The byte protocol

Every access starts with a 16-bit **address word**, most significant byte
first. Its two top bits choose the kind of access:

| bit 15 | bit 14 | access | bytes that follow |
|---|---|---|---|
| 1 | x | command; the low byte is the command code | none |
| 0 | 1 | register read at address bits 13..0 | FPGA sends 4 data bytes, MSB first |
| 0 | 0 | register write at address bits 13..0 | PC sends 4 data bytes, MSB first |

Examples: `40 01` reads the ID register, and the PC gets back `BA BA CA FE`.
`00 03 00 00 1E 3E` writes 0x1E3E into the control register. `80 03` starts
the readout.

`rw_fsm` does this decoding. For a read, it pulses `USB_read`. The register
file latches the selected register. `rw_fsm` loads it into a shift register
two cycles after the pulse and sends it out one byte at a time. For a write,
it shifts in four bytes and then presents the word on `USB_data_in` with a
one-cycle `USBW_DRY`. For a command, it holds the address word on `USB_add`
and raises `USB_CMD` until the decoder pulses `end_cmd`. A command sends no
reply bytes. The PC sees that a command has finished only when it ends in
readout data.

**Flow control.** `rw_fsm` takes a new byte only while it is waiting for an
address or write data. Its `rx_ready` output gates the receive state machine of
the USB interface. While a read reply is being sent, or a command runs, any
further bytes from the PC stay in the FT245B's receive FIFO. So the PC may
send its next access early without losing anything. This signal is an addition
of this design. Without it, bytes that arrive during a reply would be dropped.

## Sending a byte to the PC

Two blocks produce bytes for the PC: `rw_fsm` (read replies) and `faux_ro` (the
readout). Both use the same handshake with `usb_interface`:

1. The producer waits until `writing` is low and the FT245B reports room
   (`USB_TXEn` low).
2. It pulses `usb_write_ask` for one cycle, with the byte on `tx_data`.
3. It waits for `writing` to go high, then waits for it to go low again.

`tx_source_mux` sits between the producers and the interface. A readout flag
is set by `RO_cmd` and cleared by `RO_end_cmd`. It decides which producer's
request and byte are passed on, and the selected pair is registered. The
request therefore reaches the interface one cycle late. Step 3 of the
handshake absorbs that delay.

## FT245B bus timing

`usb_interface` contains two state machines that share the FT245B data bus:

- **Receive (PC to FPGA).** When `RXF#` is low, it pulls `RD#` low for
  `RD_PULSE` = 3 cycles (75 ns). It samples the bus on the edge where `RD#`
  rises, then pulses `usb_strobe` with the byte on `Rx_data`.
- **Transmit (FPGA to PC).** When a byte is pending and `TXE#` is low, it
  drives the bus for one set-up cycle. Then it holds `WR` high for
  `WR_PULSE` = 3 cycles. The FT245B stores the byte on the falling edge of
  `WR`. The bus stays driven for one more cycle.

After each access, the machine waits `RECOVER` = 5 cycles. In that time the
FT245B's minimum 80 ns flag-inactive time passes. So does the delay of the
two-flop synchronisers on `RXF#` and `TXE#`. A continuous stream of received
bytes therefore moves at one byte every 9 cycles (225 ns, about 4.4 MB/s).
That is above what the FT245B's USB 1.1 side delivers.

These numbers come from the FT245B data sheet limits:

- `RD#` low for at least 50 ns, with data valid at most 50 ns after it falls.
- `WR` high for at least 50 ns, with data set up 20 ns before it falls.
- `RXF#`/`TXE#` inactive for at least 80 ns after each access.

For another clock, change the three parameters. A pending transmit has
priority over a new receive, and the two machines never overlap. The bus is
brought out as `USB_data_i` / `USB_data_o` / `USB_data_oe`, for a tristate
pad. `USB_SIWU` is held high (send-immediate not used) and `reading` is held
low.

## Commands

| code | order pulsed | completion awaited |
|---|---|---|
| 01 | `load_SC` (load slow control and check it) | `SC_end_cmd` |
| 11 | `load_no_check_SC` (load without checking) | `SC_end_cmd` |
| 02 | `start_acq_cmd` | `Acq_end_cmd` |
| 21 | `RamFullExt_cmd` | `RamFullExt_end_cmd` |
| 22 | `TrigExt_cmd` | `TrigExt_end_cmd` |
| 03 | `RO_cmd` (readout, served by `faux_ro`) | `RO_end_cmd` |

`cmd_decoder` pulses the order for one cycle and waits for the completion
signal. Then it pulses `end_cmd` and waits for `USB_CMD` to drop. An unknown
code finishes at once.

The slow-control, acquisition and HARDROC trigger logic is outside this RTL.
Its orders and completion signals are ports of `dif_usb_top`. If a completion
input is tied low, its command never finishes, and the link waits for it.

`faux_ro` is a stand-in for the real digital readout. It shows how a data
block flows to the PC. On `RO_cmd` it sends `NB_BYTES` (top parameter
`RO_NB_BYTES`, default 16) bytes counting 0, 1, 2, …, then pulses
`RO_end_cmd`.

## Register map

Addresses are decimal. Bits 15 and 14 of the address word are not part of the
address.

| addr | register | reset value | access |
|---|---|---|---|
| 0 | test | 98765432 | read |
| 1 | ID | BABACAFE | read |
| 2 | test register | 1234ABCD | read/write |
| 3 | control [12:0] | 1F3F | read/write |
| 4 | status | 22222222 (constant) | read |
| 5 | number of HARDROC chips [7:0] | 01 | read/write |
| 6 | slow-control report [7:0] | input port | read |
| 10 | monitoring control [7:0] | F9 | read/write |
| 11 | temperature [7:0] | input port | read |
| 12 | DIF current [7:0] | input port | read |
| 13 | slab current [7:0] | input port | read |
| 14 | ADC channel 4 [7:0] | input port | read |
| 19 | slow-control debug [7:0] | 00 | read/write |

Control register bits:

- Bits 0 to 5 are active-low resets: FPGA, HARDROC, BCID, slow control, shift
  register and SC report.
- Bits 8 to 12 are power enables: analog, DAC, ss, digital and ADC.

This block only stores these bits. The logic that acts on them is elsewhere.

Narrow registers read right-aligned, with zeros above. Unlisted addresses read
zero. Writes to read-only addresses are ignored.

## How far to trust it

Taken from the DIF firmware description:

- the block split and the port names;
- the address-word format;
- the command codes and register map, with its reset values;
- the readout multiplexer.

This design's own choices:

- all FT245B timing;
- the byte handshake;
- the register read latency;
- that the command code sits in the low byte;
- the handling of unknown codes and addresses;
- the `rx_ready` flow control;
- the readout data pattern and length.

One naming point: slow-control code 01 drives `load_SC` and code 11 drives
`load_no_check_SC`. This follows the command list and the signal names, not
one port comment that says otherwise.

The FT245B behaviour is checked against a behavioural bus model, not real
hardware.

## Files and simulation

- `rtl/dif_usb_pkg.sv`: command codes, register addresses and reset values.
- `rtl/usb_interface.sv`, `rw_fsm.sv`, `cmd_decoder.sv`, `usb_register.sv`,
  `faux_ro.sv`, `tx_source_mux.sv`: the blocks.
- `rtl/dif_usb_top.sv`: the top.
- `tb/ft245b_model.sv`: FT245B bus model used by the testbenches. It has PC
  side queues and checks the bus timing.
- `tb/tb_<block>.sv`: self-checking testbenches. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_dif_usb_top.sv`: the end-to-end test at default parameters. It
  checks every register, every command, the readout, a full transmit FIFO and
  early PC data.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dif_usb_pkg.sv tb/tb_dif_usb_top.sv --top-module tb_dif_usb_top
./obj_dir/Vtb_dif_usb_top
```

For a single block, name its testbench in the same way. `-y` lets Verilator
find the modules that the testbench uses.
