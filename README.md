# NOVA ↔ DFS seismic tape interface

This is synthesizable SystemVerilog for a peripheral controller. It connects a Data General
NOVA minicomputer to a Texas Instruments Digital Field System (DFS), a 21-track tape unit that
records 31 seismic channels at 1000 samples per second. In playback the tape sends one word
about every 32 µs. Most programs need only some record, block and channel words. If software
had to sort every word, little of each word time would remain for storing data. The interface
therefore filters the stream in hardware:

- it drives the tape transport (stop, forward playback, reverse search);
- it recognises the kind of each word (record number, block number, channel data, end of data);
- it wakes the computer only for the word types and channels the program asked for.

Each selected word waits in a one-word data register until the program takes it. Three errors
are detected and reported to the program as a NOVA jump instruction that it can execute:

- the program was too late to take a word;
- the link to the tape unit was dropped;
- the channel mask lost step with the data.

The logic follows a published design from the early 1970s, which is given as Boolean transfer
equations for individual flip flops. Here those equations are written as single-clock RTL. The
places where the original is silent or contradicts itself, and the choices made there, are
listed under [Departures and interpretations](#departures-and-interpretations).

## The data stream from the tape

A record on tape is laid out like this:

| section        | words                                   | bit 0, bit 1, bit B |
|----------------|-----------------------------------------|---------------------|
| start of data  | record number (10 bits, in bits 8–17)   | 1 0 1               |
| blank period   | all-zero words, about 0.5 s             | 0 0 0               |
| data section   | blocks of 32 words; word 0 is the block number (channel 0), words 1–31 are channels 1–31 | 0 0 1 for the block word, S S 0 for data (S = sign) |
| end of data    | all-ones words                          | 1 1 1               |

Bits are numbered NOVA style: bit 0 is the most significant. Bit P gives odd parity over
bits 0–17. A record usually holds 4000 to 5000 blocks, which is 4 to 5 s of data at 1 ms per
block.

The DFS puts each word on 18 *data lines*: TRF0, TRF1, TRF4–TRF17, TRFP and TRFB. In the RTL
they form the struct `trf_lines_t`. The tape unit sends three pulses with each word:

| time after the word is read | event |
|---|---|
| +12 µs | word appears on the lines |
| +28 µs | PES, only if the parity is wrong |
| +32 µs | CLOCK |
| +40 µs | lines cleared for the next word |

At the slow speed every time doubles. The interface only uses the order of these events: PES
comes before the CLOCK of the same word, and the word is still on the lines at its CLOCK.

## Programming model

The NOVA addresses the device with its 6-bit device code. The code is the `DEVICE_CODE`
parameter, octal 30 by default. The original does not give one.

| instruction | effect |
|---|---|
| `DOA` | write the command register A0–A7. AC bits 8 and 9 choose the transfer: `00` load, `10` OR (set bits), `x1` AND-NOT (clear bits) |
| `DIA` | read A0–A7 in AC 0–7 and the DFS parity error counter PDF0–7 in AC 8–15 |
| `DOB` / `DOC` | write the two halves of the channel mask, BC0–15 and BC16–31 |
| `DIB` | read the data register BB, or BC0–15 if A7 = 1 |
| `DIC` | read the status register CC, or BC16–31 if A7 = 1 |
| `NIOS` (STRT) | clear DONE, set BUSY, clear INTREQ and SPEF, form the jump word after an error |
| `NIOC` (CLR) | clear everything except A0–A3 |
| `NIOP` (IOPLS) | act as one CLOCK: shift the mask, count S, test for requested data |
| `IORST` | clear the interface (all devices) |
| `MSKO` | AC bit 10 sets or clears INTDIS |

The command bits are:

| bit | name | meaning when 1 |
|---|---|---|
| A0 | ON | the NOVA wants the DFS. At 0 the error flip flops are held clear |
| A1 | RUN | run the transport. At 0, STOP |
| A2 | SRM | search mode, reverse. At 0, playback, forward |
| A3 | masked | apply the channel mask. At 0, every channel counts as selected |
| A4 | — | request record numbers |
| A5 | — | request block numbers (only while A6 = 0) |
| A6 | — | request the data of the selected channels (block number included) and end-of-data |
| A7 | — | `DIB`/`DIC` read the mask register, for testing |

The status word is made of these bits: CC0 EDF, CC1 SDF, CC2 DATA, CC3–7 S0–S4, CC8 NOVA DFS,
CC9 IMS, CC10 CUT, CC11 LATE, CC12 INTDIS, CC13 INTREQ, CC14 PEF and CC15 SPEF.

A typical load proceeds in four steps:

1. Request record numbers (A4), and reverse the tape if the first one is past the wanted record.
2. Switch back to playback and request block numbers (A5) until the wanted block comes.
3. Set A6 and take the selected channel words one by one.
4. For each word, run `DIB`, `DIC` and `NIOS`, then test DONE again. If DONE is still on, an
   error has occurred, and `DIB` now returns a jump instruction.

## How the selection works

### Word recognition (`data_recognition`)

Three signals classify the word now on the data lines:

- `SD = TRF0·/TRF1`: a record number.
- `ED = TRF0·TRF1·TRFB`: end of data.
- `BL = TRFB·DATA`: a block number.

The DATA flip flop marks the data section, and only in playback. A block word sets it with the
level condition `/A2·/TRF0·TRFB`, already before that word's CLOCK. An end-of-data word or
search mode clears it. SDF and EDF take SD and ED at every CLOCK. The program sees them in the
status word, and uses EDF to learn that the record has ended.

### Channel mask (`mask_shift_register`)

This part is the least obvious. The 32-bit register rotates right by one place on each channel
word (`DATA·CLOCK`) or on `NIOP`: BC(n+1 mod 32) ← BC(n). The mask bit of the channel now on
the lines is always in BC31.

For that to hold, the mask bit of channel *n* must be loaded into **BC(31−n)**:

- before channel 0, BC31 holds channel 0's bit;
- the CLOCK of channel 0 brings channel 1's bit to BC31, and so on;
- after 32 shifts (one block) the register holds its original content again.

The program therefore writes the mask bit-reversed. `DOB` carries channels 31…16 in AC 0…15,
and `DOC` carries channels 15…0. A mask bit of 1 selects the channel. Channel 0 (the block
number) is normally left selected so that the program can follow the block count.

### Necessary data and DONE (`done_circuit`)

A word is *necessary* (ND) when the command asks for its type:

    ND = A4·SD + A5·/A6·BL + A6·[(/A3 + BC31)·DATA + ED]

With `CK = CLOCK + IOPLS`, DONE follows this equation:

    DONE ← [(DONE + BUSY·ND·CK)·/STRT + BUSY·ERROR]·/(CLR + IORST)

- DONE is set only while BUSY is on. Setting DONE clears BUSY.
- On the same clock edge, unless an error is present, the data lines are copied into the data
  register: BB0–13 ← TRF4–17, BB14 ← TRFP, BB15 ← TRFB.
- STRT clears DONE and sets BUSY again.

An error holds DONE on through STRT. This is how the program tells an error from a normal
word. INTREQ follows DONE one clock later while INTDIS is 0, and STRT clears it.

### Errors and the jump word (`error_detection`, `data_register`)

| error | set when | jump word left in BB after STRT |
|---|---|---|
| LATE | a requested word's CLOCK arrives while DONE is still on | `0000000100000001` = JMP .+1 |
| CUT  | NOVA DFS falls: the operator pressed reset, or the DFS stopped by accident | `0000000100000011` = JMP .+3 |
| IMS  | a block number arrives (BL rises) while the synchronization counter S ≠ 0 | `0000000100000111` = JMP .+7 |

If more than one error is present, the jump goes to the routine of the worst one. S is a 5-bit
counter that is cleared outside the data section and counts the channel words. Where the mask
and the data agree, S is back at 0 at every block number. An extra or missing CLOCK, or a
parity error that corrupts bit B, breaks that agreement. All three error flip flops are cleared
by A0 = 0, CLR and IORST.

### Parity (`status_register`)

PEF catches PES for the word on the lines and is cleared by the next CLOCK. At that CLOCK it is
copied into SPEF, but only if the word is a requested one, so SPEF always describes the word in
the data register. STRT clears SPEF.

### Link and transport (`nova_dfs_control`)

The operator sets the NOVA DFS flip flop with a button on the tape unit. It is cleared by a
second button, or by an accidental stop. An accidental stop is a STOPDP pulse that arrives
while RUN is commanded and START5 shows the transport stopped.

While NOVA DFS is set, the outputs are:

- `dfs_stop = /A1`
- `dfs_srm = A1·A2`
- `dfs_pbm = A1·/A2`
- `pss_inhibit = 1`. This blocks the DFS's own stop pulse (PSS). Without it, the DFS stops the
  tape at the end of every record, and in search mode at a record number set on its switches

Each new run mode first produces a one-cycle `mode_stop` pulse, so the transport stops before it
reverses.

## RTL structure and timing

```
dfs_interface            top; NOVA bus and DFS signals as plain ports
├─ nova_io_port          SELDFS decode, strobe gating, DIA/DIB/DIC multiplexer
├─ command_register      A0–A7
├─ nova_dfs_control      NOVA DFS flip flop, transport controls, mode-change stop pulse
├─ data_recognition      SD/BL/ED, SDF/DATA/EDF
├─ mask_shift_register   BC0–BC31
├─ done_circuit          ND, DONE/BUSY/INTDIS/INTREQ
├─ error_detection       LATE/CUT/IMS, counter S
├─ data_register         BB0–BB15 and the jump word
└─ status_register       CC0–CC15, PEF/SPEF
dfs_pkg                  shared types (trf_lines_t, cmd_t, status_t, nova_strobes_t) and jump words
```

The whole design uses one clock, `clk`:

- Every pulse input is sampled as a one-cycle strobe. These are the NOVA strobes, CLOCK, PES
  and STOPDP.
- DONE rises on the edge that samples the CLOCK of a requested word.
- `data_in` is combinational during a DIA, DIB or DIC strobe and is 0 otherwise.

The clock must be fast enough that the program can answer between two words. At 1 MHz there are
32 cycles per word at 1 ms speed. Inputs from the DFS must already be synchronous to `clk`.

After power-up, give `IORST` once. NOVA DFS has no reset and starts at an arbitrary value until
the operator presses a button.

Vectors are declared with ascending ranges (`[0:15]`), so that index *n* is NOVA bit *n*.
Verilator's `ASCRANGE` style warnings come from this convention.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build any of them with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dfs_pkg.sv tb/dfs_tape_pkg.sv tb/tb_dfs_interface.sv --top-module tb_dfs_interface
./obj_dir/Vtb_dfs_interface
```

`tb/dfs_tape_pkg.sv` is only needed by the testbenches that use the tape model. The other
files are found through `-I`.

| testbench | what it covers |
|---|---|
| `tb_dfs_interface` | End to end, top at its default parameters, with the behavioural tape unit `tb/dfs_tape_model.sv` and a NOVA program written as tasks. Covers: mask test path and NIOP, record search with a switch to reverse, block search, selected-channel loading checked word by word with SPEF, end of data, and LATE, IMS (injected extra CLOCK), CUT (operator reset) and an accidental stop at the end of the tape, each with its jump word. Also checks interrupts with and without INTDIS, and that DONE comes one cycle after CLOCK. Counts every mechanism |
| `tb_record_playback` | A whole record at both tape speeds: 5000 blocks at 1 ms and 2500 at 2 ms, 160 002 words each. Every word is loaded and checked. The program waits until 8 clk cycles before the next word is due before it answers, and LATE must never occur |
| `tb_memory_load` | A loading program like the one the interface was built for. It searches for a record (in reverse when the tape is past it), then for a block, and stores 8 selected channels of a 5000-block record in a 32K-word memory. When memory is full it stops the tape and resumes at the saved block, and it ends at the end-of-data word. The stored stream and its parity-error table are checked against the tape |
| `tb_<block>` | One per RTL block, each against a reference model of its equations with random traffic plus directed cases |

`dfs_tape_model` builds the tape content from the formulas in `dfs_tape_pkg`. Channel values
are a multiplicative hash of record, block and channel. About one data word in eleven is
recorded with a parity error. The testbenches recompute the same formulas to know what to
expect.

## Departures and interpretations

The original design is a set of flip-flop equations. In a few places the description is
incomplete or contradicts itself. These are the readings taken here:

- **Single clock.** The original flip flops are set directly by the I/O and tape pulses. Here
  they are sampled by one clock. A visible consequence: when STRT meets an error, the
  `BUSY·ERROR` terms also count the BUSY that STRT is setting in the same cycle. DONE therefore
  stays on without a one-cycle gap, and the jump word appears on the STRT edge.
- **Mask bit order.** The rotation rule and the register picture put channel *n* in BC(31−n),
  and that is what is built. An example in the software description instead loads channel 0 in
  bit 0 of the B half. A program written to that example selects mirrored channels.
- **Resetting DATA.** DATA is cleared by search mode or by an end-of-data word. This follows
  the rule that the data section ends at the end-of-data word and exists only in playback.
- **SDF.** SDF takes SD at every CLOCK, with SD = TRF0·/TRF1. This is the start-of-data code
  of the tape format.
- **NOVA DFS and clears.** Neither CLR nor IORST clears NOVA DFS. The loading program tests
  NOVA DFS right after it clears the device, and only the operator can set it again.
- **Accidental stop.** The detection logic is not given. The rule used here: STOPDP while RUN
  is commanded and START5 is low.
- **Counter S and NIOP.** S also counts on NIOP while DATA = 1. The description of NIOP lists
  this, but the counter's own equation names only CLOCK.
- **Standard NOVA flip flops.** BUSY, INTDIS and INTREQ follow the usual NOVA device rules, in
  a simple form. There is no interrupt priority chain and no INTA device-code response.
- **Device code and bus.** The device code is a parameter. The data-in bus is driven with 0 when
  the device is not read, so several devices can be ORed together.

The tape unit and the computer are outside this design. Their signals are top-level ports, and
the tape exists only as a simulation model.
