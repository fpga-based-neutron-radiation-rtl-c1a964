# Radiation-tolerant PIC16C57-compatible microcontroller

An 8-bit microcontroller for an FPGA that has to keep working under neutron
radiation, such as the inside of an accelerator tunnel. Neutrons cause
single event upsets (SEUs): a stored bit flips while the circuit stays
undamaged. The design protects the two kinds of storage in different ways.

* **Flip-flops: triple modular redundancy (TMR).** Every flip-flop is
  stored three times and read through a 2-of-3 majority voter. The voted
  value is written back on every clock edge, so an upset copy is repaired
  at the next edge. A mismatch between the copies is reported.
* **SRAM: Hamming code and scrubbing.** Tripling memory would cost three
  times the SRAM. Each word is stored with Hamming parity bits instead. A
  read corrects any single flipped bit. A scrubber sweeps the whole memory
  at intervals and writes corrected words back, so that single errors do
  not build up into uncorrectable double errors.

The processor runs the PIC16C57 instruction set. Its intended use is an SRAM
SEU detector: firmware writes patterns into an SRAM chip under test, checks
them, and reports the errors found to a PC over a 9600 bit/s serial link.
The link uses RS-485 or optical fibre.

```
            external FLASH                 external program SRAM (17-bit words)
                 |                                   ^
                 v                                   |
   +-------------------------------------------------------------------- FPGA --+
   |  boot_loader ----writes----> edac_scrub (K=12, R=5, 2048 words) <-- fetch  |
   |                                                                   |        |
   |                                             pic_core (TMR) -------+        |
   |  sp_ram (72 x 12) <--> edac_scrub (K=8, R=4, 72 words) <-- register file   |
   |                                              |  port B / RA1:0            |
   |                                   uart_tx / uart_rx (TMR) --- txd / rxd    |
   |                                              |  RA3:2, port C --> SRAM under test
   +----------------------------------------------------------------------------+
```

Top module: `rt_mcu` (`rtl/rt_mcu.sv`).

## TMR registers

`tmr_reg` is the only place in the design where state is stored in
flip-flops. It holds three copies `r0`, `r1`, `r2` and votes them with
`tmr_voter`, which computes `(a&b)|(a&c)|(b&c)` per bit. The voter has no
state, so an upset cannot be stored in it. Its clock is never gated. When
`en` is low, the voted value `q` is loaded back into all three copies. So the
register refreshes itself on every edge and needs no scrubbing. `err` is high
while any copy differs from the others. That lasts from the upset to the next
clock edge.

Every block keeps all of its state in a single `tmr_reg`. The state is
declared as a packed struct (`core_t`, `ctl_t`, `tx_t`, ...). An
`always_comb` block computes the next state `ns` from the voted state `s`,
and the register loads `ns` on every clock (`en = 1`). So an upset anywhere
in a block's state is out-voted at once and repaired at the next edge. The
block's single `tmr_err` output reports it.

Be careful when synthesizing. All three copies have the same D input, so a
synthesis tool merges them into one flip-flop unless stopped. The copies
carry `keep` and `syn_preserve` attributes, and some tools need their own
equivalent. Check the flip-flop count after synthesis: it should be three
times the state width. Another way to avoid the merging is to synthesize a
design with plain flip-flops and then replace every flip-flop in the netlist
with a TMR cell (three flip-flops plus a voter) before a second synthesis.

The combinational logic is not tripled. A transient that is captured looks
like an upset in one copy, provided it reaches only one copy. A transient on
a D input shared by all three copies is captured by all three. This
design does not protect against that.

## Hamming code and the scrubber

`hamming_enc` and `hamming_dec` implement a plain single-error-correcting
Hamming code with K data bits and R parity bits, where 2^R >= K+R+1.
Code bit `i` holds Hamming position `i+1`. Parity bits sit at positions
1, 2, 4, 8 and 16. Data bits fill the remaining positions in ascending
order. Parity bit 2^j is the XOR of every position whose index has bit j
set. So the decoder's syndrome, which is the XOR of the indices of all set
bits, equals the position of a single flipped bit. Double errors are not
detected. The codes used here:

| memory              | data | code word | words | where                      |
|---------------------|------|-----------|-------|----------------------------|
| program memory      | 12   | 17 (R=5)  | 2048  | external SRAM, `pm_sram_*` |
| register file (GPR) | 8    | 12 (R=4)  | 72    | `sp_ram` inside the FPGA   |

`edac_scrub` sits between a client and a single-port memory whose read data
arrives one cycle after the address. It works as follows:

* **Client write:** the word is encoded and written in the cycle of the
  request. `ack` is high in that same cycle.
* **Client read:** the controller takes two cycles, then returns the
  corrected data with `ack`. `corr` is high if a bit was corrected. The
  corrected word is not written back. Fixing the memory is left to the
  scrubber.
* **Sweep:** a timer counts `SCRUB_PERIOD` cycles (default 65536). Then
  the whole memory is swept, two cycles per word. The first cycle reads the
  word. The second decodes it and, only if the syndrome is non-zero, writes
  the corrected code word back and pulses `scrub_fix`.
* **Halting the client:** while the sweep runs, `busy` is high and client
  requests get no `ack`. The processor therefore stops for the length of the
  sweep whenever it needs that memory. Program memory is needed by every
  fetch. A program memory sweep takes 4096 cycles, about 6 % of the time at
  the default period. A register file sweep takes 144 cycles.

The scrubber's own state (FSM, address, timer) is held in a `tmr_reg`.

## The processor core

`pic_core` runs the PIC16C57 programmer's model:

* 33 twelve-bit instructions.
* 2048 words of program space in four pages, selected by STATUS<6:5>.
* A two-level stack. The reset vector is 0x7FF.
* Special registers at file addresses 0x00-0x07: INDF, TMR0, PCL, STATUS,
  FSR, PORTA (4 bits), PORTB and PORTC.
* 72 general purpose bytes. Addresses 0x08-0x0F are common to all banks.
  Addresses 0x10-0x1F are banked four times by FSR<6:5>.
* TMR0 with the shared 8-bit prescaler. The watchdog is described below.

The general purpose registers live outside the core, in the
Hamming-protected register-file RAM. They are packed into addresses 0..71:

* 0x08-0x0F map to 0-7.
* Register 0x10+i of bank b maps to 8+16b+i.

The microarchitecture is not a copy of the PIC's four-phase clock. Each
instruction runs in three phases, and every memory access is a req/ack
handshake. A phase therefore simply waits when a memory is busy scrubbing.

| phase | work                                              | cycles            |
|-------|---------------------------------------------------|-------------------|
| FETCH | read program word at PC, PC+1                     | 2 (EDAC read)     |
| READ  | operand: special register, or GPR from the RAM    | 1, or 2 for a GPR |
| WRITE | ALU, write W or file register, flags, PC and stack | 1                |

An instruction takes 4 cycles, or 5 when it reads a general purpose
register. Some instructions change the PC: GOTO, CALL, RETLW and writes to
PCL. These, and skips that are taken, are followed by one idle instruction
cycle of 3 cycles, as in the two-cycle instructions of the PIC data sheet.
The serial link's 9600 bit/s implies no clock frequency. The defaults assume
20 MHz, the PIC16C57's top speed, which gives about 4-5 MIPS.

Details that a port of PIC firmware may depend on:

* Flags follow the data sheet. SUBWF sets C and DC to "no borrow".
  An instruction that writes STATUS and also sets flags keeps the flags it
  computes.
* Reading a port returns the pin where TRIS=1 and the output latch where
  TRIS=0. Port writes are reported on `port_wr`, together with the written
  value on `port_wdata`. Port reads are reported on `port_rd`.
* The watchdog counts `WDT_CYCLES` clock cycles in place of the on-chip RC
  oscillator. The default is 360000, the nominal 18 ms at 20 MHz. When
  OPTION.PSA = 1, the prescaler follows the watchdog, at 1:2^PS.
* A watchdog timeout resets the core:
  * PC = 0x7FF, OPTION = 0x3F, TRIS all ones, PA cleared.
  * STATUS.TO = 0. STATUS.PD = 0 after a wake-up from SLEEP, 1 otherwise.
  * W, FSR, TMR0, the port latches and the stack keep their values.
* CLRWDT and SLEEP clear the watchdog. `WDT_EN = 0` switches it off, in
  place of the configuration fuse. Without the watchdog, SLEEP lasts until
  reset.
* A write to TMR0 clears the prescaler (when TMR0 owns it) and holds off
  TMR0 increments for the next two instruction cycles, as on the PIC16C57.
* Not built: the MCLR-specific reset values. `rst_n` acts as power-on reset.

## Around the core (`rt_mcu`)

* **Boot.** After reset, `boot_loader` reads FLASH words 0..2047 and writes
  each one through the program memory's EDAC controller into the external
  SRAM. It then raises `boot_done`, and only then does the core start
  fetching. The FLASH answers one cycle after the address. The copy takes
  about 6200 cycles.
* **UART on port B** (8N1, `CLKS_PER_BIT` = 2083):
  * Writing PORTB sends the byte.
  * Reading PORTB returns the last byte received and clears its valid flag.
  * RA0 reads "transmitter busy". RA1 reads "byte received".
* **Free pins.** RA3:RA2 and RC7:RC0 are left for the SRAM under test, as
  `*_in`, `*_out` and `*_tris` (1 = input). The way the chip under test is
  wired and the test firmware are application matters and are not part of
  this RTL.
* **SEU indication.** `seu_tmr[5:0]` has one TMR mismatch flag per block:
  core, program-memory scrubber, register-file scrubber, UART transmitter,
  UART receiver, boot loader. `pm_ecc` and `dm_ecc` pulse for every corrected
  word, whether found by a read or by the scrubber. Counting these events
  over time measures how sensitive the FPGA's flip-flops and the SRAMs are.

## Parameters

| module      | parameter         | default | meaning |
|-------------|-------------------|---------|---------|
| rt_mcu      | CLKS_PER_BIT      | 2083    | UART bit time: 20 MHz / 9600 bit/s |
| rt_mcu      | PM_SCRUB_PERIOD   | 65536   | cycles between program memory sweeps |
| rt_mcu      | DM_SCRUB_PERIOD   | 65536   | cycles between register file sweeps |
| rt_mcu      | WDT_EN            | 1       | watchdog on |
| rt_mcu      | WDT_CYCLES        | 360000  | watchdog period before the prescaler |
| edac_scrub  | K, R, DEPTH, AW   | 8, 4, 72, 7 | data bits, parity bits, words, address bits |
| tmr_reg     | W, RST_VAL        | 1, 0    | width, reset value (asynchronous, active low) |

The 9600 bit/s rate and the split into TMR logic plus Hamming-coded,
scrubbed SRAM come from the original design. The following are choices made
here and may be changed:

* the clock frequency;
* the scrub periods;
* the plain SEC Hamming code (a SEC-DED code would add one bit);
* write-back only by the scrubber;
* the UART mapping;
* the boot copy.

## Files

`rtl/`:

* `tmr_voter.sv`, `tmr_reg.sv`: TMR building blocks.
* `hamming_enc.sv`, `hamming_dec.sv`: the Hamming code.
* `edac_scrub.sv`: EDAC controller and scrubber.
* `sp_ram.sv`: the embedded RAM.
* `pic_core.sv`: the processor core.
* `uart_tx.sv`, `uart_rx.sv`: the UART.
* `boot_loader.sv`: the boot copy from FLASH.
* `rt_mcu.sv`: the top module.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`. `pic_test_prog_pkg.sv` holds the
instruction encoders and the test program that the core and system
testbenches share. That program covers:

* the ALU and its flags;
* direct, indirect and banked addressing;
* nested CALL/RETLW;
* loops and skips;
* a computed jump through PCL;
* page switching;
* TMR0 counting external pulses and instruction cycles;
* a serial echo loop;
* SLEEP and watchdog wake-up.

`tb_seu_detector.sv` runs the application the chip was built for: a
detector that watches an external SRAM for upsets while it is itself being
irradiated. Its firmware is in `seu_detector_prog_pkg.sv` and runs on the
full system at default parameters. A 16-byte SRAM model with an address
counter hangs on the pins:

* RA3 high clears the address counter;
* a pulse on RA2 writes PORTC into the addressed byte while port C drives;
* the falling edge of RA2 steps to the next byte;
* with port C as input, its pins show the addressed byte.

The firmware fills the SRAM with 0x55 and then loops:

1. it counts the bytes that no longer read 0x55;
2. it sends the count at 9600 bit/s;
3. it rewrites the pattern if the count was not zero.

The testbench plants 3, 1 and 5 upsets in the SRAM and checks that exactly
those counts arrive. Meanwhile it also upsets the detector itself: a core
TMR copy, a transmitter TMR copy, a word of program memory and a register.
This interface and firmware are only an example; any wiring that fits the
free port pins will do.

Several testbenches plant upsets, either by forcing one TMR copy for a
moment or by flipping bits in a memory model. They then check that the
results are unchanged and that the upset was reported.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv --top-module tb_rt_mcu tb/tb_rt_mcu.sv
./obj_dir/Vtb_rt_mcu
```

Replace `tb_rt_mcu` with any other testbench name. `-Wno-fatal` is needed
because forcing a copy inside `tmr_reg` draws a multiple-driver warning.
`tb_rt_mcu` runs the whole system at its default parameters. It takes about
47 million cycles, most of them waiting for the watchdog to end SLEEP, and
about 1.5 minutes of simulation. The run covers:

* boot;
* the test program;
* at least one sweep of each memory;
* a core stall behind a sweep;
* ECC corrections in both memories;
* TMR upsets in the core and the UART;
* three bytes echoed over the serial line;
* the watchdog wake-up.

## How far it has been checked

Every testbench passes, including with random power-up values. Each one was
also run against a deliberately broken copy of its module, and it failed.

The instruction set was checked only against the hand-computed results of
the test program. Not every instruction-flag combination is covered, and the
core has not been compared with a real PIC16C57. TRIS/OPTION corner cases,
the register values after a watchdog reset that the tests do not read, and
the exact TMR0 timing around writes are the least tested parts.

Synthesis was checked only at the level of elaboration and generic cells.
No FPGA place-and-route or timing was done. Heed the TMR merging caution
above.
