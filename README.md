# IBM 5150 motherboard in SystemVerilog

This is the logic of the original IBM Personal Computer (model 5150) motherboard, rebuilt as synthesizable SystemVerilog for an FPGA with a 100 MHz board clock. It covers the 8088 bus with its 8284 clock generator and 8288 bus controller, the 8259 interrupt controller, the 8253 timer, the 8255 peripheral interface, the 8237 DMA controller with its page register, the motherboard glue logic, 64 KB of ROM, 256 KB of RAM, a PS/2 keyboard path, and an 80 x 25 colour text display for a VGA monitor. The processor core is **not** included. The design gives a 16-bit core (a Zet-style 8086 core) a request port. A wrapper turns each request into genuine 8-bit 8088 bus cycles, so everything behind it sees the bus of a real PC.

The peripherals are cut down to what the PC BIOS uses. Each chip does what the BIOS programs it to do and little more. For example, the 8259 always uses vector base 08h, and the 8255 always runs in the BIOS configuration (control word 99h).

## Motherboard blocks

| module | role |
|---|---|
| `ibm5150_top` | the motherboard: wires everything onto one system bus; 62-pin channel signals as ports |
| `pc_pkg` | shared types: bus status codes, command bundle, I/O base addresses |
| `clkgen_8284` | CLK 4.77 MHz (33 %), PCLK, OSC, VCLK 25 MHz, READY and RESET synchronisation |
| `cpu_bus_if` | core request port to 8088 bus cycles (T1-T4, wait states, two INTA cycles) |
| `bus_ctrl_8288` | status S2..S0 to MEMR#/MEMW#/IOR#/IOW#/INTA#, ALE, DT/R, DEN |
| `mb_control` | wait-state generator, DMA hold arbitration (HLDA/AEN), NMI mask and sources, I/O channel check, RESET DRV |
| `addr_decode` | ROM/RAM bank selects, on-board I/O chip selects, video window |
| `pic_8259` | interrupt controller, fixed configuration |
| `pit_8253`, `pit_counter` | interval timer, modes 0/2/3, binary |
| `ppi_8255` | peripheral interface fixed to mode 0 with A in, B out, C in |
| `dma_8237` | four-channel DMA controller |
| `dma_page_reg` | LS670-style page register giving A19..A16 for DMA |
| `rom_bios` | 8 x 8 KB ROM at F0000-FFFFF, loaded through a port |
| `ram_256k` | 4 x 64 KB RAM at 00000-3FFFF |
| `kbd_ps2_rx` | PS/2 receiver, set 2 to set 1 translation, IRQ1 data latch |
| `kbd_loader` | plays stored keystrokes into the keyboard path |
| `vdu_text` | colour text unit: dual-port screen RAM, font RAM, CRTC subset, VGA timing |

Every file starts with a comment that explains the module's function, timing and interface. Each testbench `tb/tb_<module>.sv` checks its module against values it works out on its own. Two more testbenches, `tb_arpeggio` and `tb_basic_typing`, run the whole motherboard through demo workloads. Each testbench prints `TB_RESULT checks=N failures=M`.

## One clock, many enables

Nothing in the design runs on a derived clock. `clkgen_8284` divides the 100 MHz board clock with counters:

| clock | period | high | strobe |
|---|---|---|---|
| CLK (processor, bus) | 21 board cycles = 210 ns | 7 cycles (33 %) | `clk88_rise` (called `ce` elsewhere) |
| PCLK | 42 cycles | 50 % | `pclk_rise` |
| OSC | 7 cycles = 70 ns | 4 cycles (57 %) | none (`ch_osc` output only) |
| VCLK (pixels) | 4 cycles = 40 ns | 50 % | `vclk_rise` |

Every flip-flop is clocked by `clk` and advances on one of the one-cycle strobes. The timer counts at PCLK/2 = 1.19 MHz (a tick every 84 board cycles). This is the PC's counter clock, so the BIOS divisors give the PC's rates:

- 65536 gives 18.2 Hz.
- 18 gives 66 kHz for refresh.
- 1331 gives 896 Hz for the beep.

The OSC duty cycle is 57 % rather than 50 % because 70 ns is seven board cycles.

## The bus cycle

This is the part that needs the most care when changing the design.

**Processor cycles.** The core raises `core_req` with the access type and holds it until `core_done`. `core_halt` stops the core in the meantime. `cpu_bus_if` runs one byte cycle for a byte access. It runs two cycles for a word access (low byte at the address, high byte at address + 1). An interrupt acknowledge gets two INTA cycles, and the vector comes from the second one. In CLK periods:

```
ce#0  status S2..S0 and address out            (S_TS)
ce#1  8288 sees the status: ALE                 (S_T1)
ce#2  command (MEMR#, IOW#, ...) goes low       (S_T2)
ce#3  -                                         (S_T3)
ce#4  READY sampled; low = wait state, stay in T3; high = capture data,
      status back to passive                    (S_T4)
ce#5  8288 ends the command; next byte or done
```

A zero-wait byte cycle therefore takes five CLK periods from request to `core_done`, and the top-level testbench measures this. I/O cycles always take one more. `mb_control` pulls the 8284 RDY input low for the first CLK of every I/O command, which gives the one wait state of the PC. A card can add more by pulling `ch_io_ch_rdy` low.

**Command edges.** The devices are synchronous, so the top turns the command lines into single-cycle events:

- A write to memory or to a register happens at the falling edge of MEMW# or IOW#.
- A read is served while the read command is low.
- Reads that have side effects act at the rising edge of IOR#. These are the 8253 LSB/MSB flip-flop and the 8237 status clear.
- The 8259 sees an INTA strobe at each falling edge of INTA#.

**DMA.** The 8237 raises HRQ. `mb_control` grants the bus (`hlda`, which is also AEN) at a CLK edge, but only when two things hold:

- The wrapper is between bus cycles. `bus_idle` is true in S_IDLE, between the two halves of a word access, and in the cycle after the last byte.
- LOCK# is high.

While HRQ or HLDA is high, the wrapper starts no new cycle. AEN switches the address and command multiplexers in the top over to the 8237, and A19..A16 then come from the page register. The page register's read index is the pair {DACK2#, DACK3#}. Channel 2 uses port 81h, channel 3 uses port 82h, and channels 0 and 1 share port 83h.

**Why grant between the halves of a word.** Refresh is channel 0, single mode. Every 18 timer ticks (15 µs), timer OUT1 sets a request flip-flop, and DACK0 clears it. If a grant had to wait for the whole word access to finish, the wrapper (waiting for the DMA to go away) and the arbiter (waiting for the wrapper to go idle) would deadlock. In single mode the 8237 drops HRQ for one CLK after each transfer, and the processor can get its next cycle in then.

## Interrupts and NMI

`pic_8259` latches rising edges on IR0..IR7 into IRR, whether or not they are masked. It raises INT for the highest-priority unmasked request (IR0 first) that is above everything in service. On the first INTA it moves the request into ISR. On the second INTA it drives `08h + level`. It clears ISR on a non-specific or specific EOI. ICW1 clears IRR, ISR and the mask; the ICW2/ICW4 words that follow are accepted and ignored, because the configuration is built in. OCW3 selects whether IRR or ISR is read.

The wiring is:

- IRQ0 is timer channel 0.
- IRQ1 is the keyboard.
- IRQ2-7 come from the channel.

The wrapper passes INTR to the core only while the core says it is in its fetch state. A core with a long execute phase (string instructions) would otherwise take an interrupt in the middle of it and corrupt its own state.

NMI is built from the following:

- The mask flip-flop at port A0h (bit 7) gates everything.
- Parity error is the first source. It is always 0, because there is no parity memory.
- The I/O channel check latch is the second source. It is set by I/O CH CK# while PB5 is low, and cleared by PB5 high.
- The coprocessor's NMI request is the third source. It counts only when SW1 switch 2 says a coprocessor is fitted.

## Timer, speaker and 8255 wiring

| 8253 channel | mode (BIOS) | use |
|---|---|---|
| 0 | 3, count 65536 | 18.2 Hz time of day, IRQ0 |
| 1 | 2, count 18 | refresh request to DMA channel 0 |
| 2 | 3, count 1331 | speaker tone, GATE = PB0 |

`speaker = OUT2 & PB1`, so software can gate the timer, pulse PB1 by hand, or do both.

The 8255 ports are wired as follows:

- **Port A** reads SW1 when PB7 is high. Otherwise it reads the keyboard code.
- **Port C, low half,** reads SW2 switches 1-4 when PB2 is high. Otherwise it reads switch 5.
- **Port C, upper bits:**
  - PC4 is cassette data in.
  - PC5 is timer OUT2.
  - PC6 is the I/O channel check latch.
  - PC7 is the parity error.
- **Port B** bits:
  - PB3 is the cassette motor.
  - PB5 enables the I/O channel check (active low).
  - PB7 acknowledges the keyboard and clears IRQ1.

Switch inputs are 1 for OFF.

## Keyboard path

A modern PS/2 keyboard replaces the original serial keyboard and its shift register. `kbd_ps2_rx` works as follows:

- It synchronises the PS/2 clock and data and shifts in 11-bit frames. It drops a frame with a bad start, parity or stop bit, and restarts after 100 µs of silence.
- It translates scan-code set 2 into the set 1 that the PC BIOS expects. An F0 prefix becomes bit 7 of the next code, E0 prefixes are dropped, and keys the 83-key keyboard did not have are ignored.
- It holds the code in a latch with IRQ1 raised until the processor sets PB7.

`kbd_loader` stores up to 4096 set-1 codes. When its start input is pressed, it feeds them into the same latch one at a time:

1. Wait until the receiver is idle.
2. Inject a code.
3. Wait for the processor's PB7 acknowledge.
4. Wait `GAP_CYCLES` (5 ms), so that the BIOS keyboard buffer never overflows.

This lets a BASIC program be typed in automatically.

## Text display

`vdu_text` keeps the colour adapter's memory layout and puts the picture out as VGA. Characters and attributes are two 2 KB dual-port RAMs, seen by the processor as one 4 KB window at B8000: even addresses hold characters and odd addresses hold attributes. The processor can read and write them at any time, because the display reads the other port.

The screen is 640 x 480 at 60 Hz (800 x 525 pixel clocks, negative syncs), with the 80 x 25 text area of 8 x 16 glyphs in the top 400 lines. A three-stage pipeline fetches the cell, then the glyph row, then picks the pixel and its colour. The syncs are delayed to match. The attribute byte is:

- bit 7: background intensity
- bits 6..4: background R G B
- bit 3: foreground intensity
- bits 2..0: foreground R G B

Each gun leaves as two bits {colour, intensity}, meant for a two-resistor DAC (2 kΩ and 1 kΩ) per colour.

The registers at 3D0h-3DFh are:

- **CRTC** index/data at 3D4h/3D5h:
  - R10/R11: cursor rows.
  - R12/R13: start address, for scrolling.
  - R14/R15: cursor address.
  - R16/R17: light-pen address.
- **Mode** at 3D8h: bit 3 turns video on. It is off after reset.
- **Colour select** at 3D9h: stored only.
- **Status** at 3DAh: display inactive and vertical retrace.

The font RAM is loaded through a port. The code page 437 glyphs are not included.

## Memory and I/O map

| range | device |
|---|---|
| 00000-3FFFF | RAM, four 64 KB banks (A17..A16) |
| B8000-B8FFF | text screen memory |
| F0000-FFFFF | ROM, eight 8 KB chips (A15..A13); F0000-F3FFF are empty sockets on a real PC |
| I/O 000-01F | 8237 |
| I/O 020-03F | 8259 |
| I/O 040-05F | 8253 |
| I/O 060-07F | 8255 |
| I/O 080-09F | DMA page register (write) |
| I/O 0A0-0BF | NMI mask (write, bit 7) |
| I/O 3D0-3DF | text display registers |

On-board I/O decodes A9..A5 and is disabled while AEN is high. Everything else goes to the channel: `ch_data_in` is read for unclaimed addresses, and FFh is returned when no read command is active.

## Where this differs from a real PC

- **No processor core.** The core's request side is made of ports. The 8088 bus it would produce is generated by `cpu_bus_if`.
- **No floppy controller, cassette, analog speaker driver or VGA DAC.** Their signals are top-level ports:
  - floppy: IRQ6, DRQ2/DACK2 and TC on the channel ports
  - cassette: `motor_off` and `cass_data_in`
  - speaker: `speaker`
  - DAC: the 2-bit colour outputs
- **RAM** is plain block memory. It has no RAS/CAS timing and no parity bit, and the parity error always reads 0.
- **8237:**
  - Each channel has its own register set.
  - Only fixed priority is built. Cascade and memory-to-memory are not.
  - Each transfer takes four CLK periods (S1-S4), and the DMA testbench checks this. This is about 1.2 MB/s at 4.77 MHz, against the 1.6 MB/s of the real part's compressed timing.
- **8253:** modes 1, 4 and 5 and BCD counting are not built. Writing mode 1, 4 or 5 gives mode 0.
- **8259:** always configured as the PC BIOS configures it (edge triggered, single, vector 08h). Automatic EOI, rotating priority and special mask mode are not built.
- **8255:** port directions are fixed to the PC's. Other mode words are stored but change nothing.
- **Text display:**
  - Attribute bit 7 is background intensity, not blink.
  - Graphics modes, 40-column mode and the colour-select register have no effect.
  - Frame timing is VGA rather than the CGA's 15.7 kHz.
- **Keyboard acknowledge.** The processor acknowledges a key through PB7 of the 8255, an output bit. Port C, which one description names for this, is all input in the BIOS configuration.
- **Screen size.** The text screen holds 80 x 25 = 2000 characters, each with an attribute. Both fit in the 2 KB character RAM and the 2 KB attribute RAM.
- **Timer channels.** Descriptions of the PC are not consistent here: one assigns channel 0 to refresh and channel 1 to time of day, another the reverse. This design uses OUT0 for IRQ0 (time of day) and OUT1 for the refresh request, which matches the BIOS initialisation of channel 1 with divisor 18.

## Simulating

All testbenches run with plain Verilator 5. For one block:

```
verilator --binary --timing -Irtl rtl/pc_pkg.sv rtl/pic_8259.sv tb/tb_pic_8259.sv --top tb_pic_8259
./obj_dir/Vtb_pic_8259
```

For the whole machine, the top-level testbench needs every file:

```
verilator --binary --timing -Irtl rtl/pc_pkg.sv rtl/*.sv tb/tb_ibm5150_top.sv --top tb_ibm5150_top
./obj_dir/Vtb_ibm5150_top
```

(`pc_pkg.sv` must come first; listing it twice is harmless.)

`tb_ibm5150_top` runs the top at its default parameters, with no overrides. In it, the testbench plays the processor: it programs the chips as the BIOS does and then services interrupts in a loop. It checks the following, and counts each mechanism, failing if any never happened:

- RAM and ROM reads
- the one extra CLK of every I/O cycle
- refresh DMA, and the processor being stalled while DMA owns the bus
- a four-byte card DMA through the page register into RAM, with TC
- the timer interrupt period (200 ticks) and the speaker period (100 ticks)
- three keyboard interrupts with the right codes: two from the loader and one from a real PS/2 frame
- NMI from an I/O channel check, and the switch inputs
- a full video frame with exactly one lit 8 x 16 cell

It simulates about five million board cycles, a few seconds with Verilator.

`tb_arpeggio` runs the top through the arpeggio sound demo, again at default parameters. It plays tones from 440 Hz to 1000 Hz in 5 Hz steps through counter 2, as a BASIC `SOUND` statement would. For each tone it checks two things:

- the speaker period is exactly the divisor times 84 board cycles;
- the pitch is within 0.5 % of the tone.

It also checks hand-made pulses on PB1 and silence with PB1 low. It takes about half a minute.

`tb_basic_typing` has the keystroke loader type the BASIC line `10 beep` and Enter (16 make and break codes) while the testbench plays the BIOS keyboard handler: INTA, read port 60h, pulse PB7, EOI. The handler holds off each acknowledge for a random time. The test checks:

- every code arrives once and in order;
- no key arrives before the previous one is acknowledged;
- each key follows its acknowledge by the 5 ms gap, within 20000 cycles.

The block testbenches override sizes where that keeps them short: the ROM and RAM tests use small banks, and the loader test uses a short gap. The others run at the defaults. The simulations assume two-state logic, and every state element that is read is reset or written first.

## Changing it

- **Clock.** For a different board clock, change the `clkgen_8284` divisors. Everything downstream counts enables, not nanoseconds, except these:
  - the PS/2 time-out (`FRAME_TIMEOUT`)
  - the loader gap (`GAP_CYCLES`)
- **Memory sizes.** RAM and ROM sizes are parameters, but `addr_decode` assumes the PC map.
- **Display.** `vdu_text` takes its frame timing and text geometry as parameters. `CELLS` must be at least `COLS * ROWS`.
