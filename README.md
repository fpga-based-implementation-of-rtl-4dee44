# Concatenative speech synthesis front end

A concatenative speech synthesizer makes a word by playing back, one after another,
recordings of the word's pieces. This RTL covers the part of such a synthesizer that
decides what to play. A six-letter target word is cut into two-letter segments
("bamite" becomes `ba`, `mi`, `te`). Each segment is looked up in an acoustic library
of phones, and the start address of the matching phone's recording is handed to an
audio player. The next segment is looked up only after the player reports that the
recording has finished. The playback engine, the audio memory and the codec are outside
this design. So is any smoothing across the joins between recordings.

The design is a small controller/datapath machine of about 80 flip-flops plus the
library memory. It has an eight-state controller, a linear search through the library
with a counter, and a 16-bit equality comparator.

## Block structure

```
tts_top
├── input_module        4:1 word multiplexer (shift)
└── synthesis_system
    ├── controller      8-state FSM (S0..S7)
    └── datapath
        ├── segment_queue   word register, presents segment X = R(I)
        ├── counter_k       library scan address K, kvalue
        ├── phone_ram       library: {phone[15:0], start address[18:0]} x 2**ADDR_W
        │   └── inv         sel -> write-allowed
        ├── comparator      X == Y(K) -> cmp
        └── output_module   start-address register, loaded on found
```

`tts_pkg` holds the widths and types that the files share:

| constant / type | value |
|---|---|
| 8-bit characters | 6 per word, so `word_t` is 48 bits |
| `phone_t` | one segment or phone, 16 bits |
| `saddr_t` | recording start address, 19 bits |
| `lib_entry_t` | packed `{phone, saddr}`, 35 bits |
| `state_t` | controller state |

## The controller

The controller is the heart of the design. Its states use the binary codes A, B, C
listed below, and the logic is written to match these sum-of-products equations
exactly:

```
A+ = S3·!kvalue + S4 + S6
B+ = S1·load + S2 + S3·kvalue + S4·cmp + S5 + S6 + S7
C+ = S0·ready + S1·!load + S2 + S4·!cmp + S5 + S6·player_done
reset_K = S0·ready + S3·kvalue + S7      incr_I = S3·kvalue + S7
incr_K  = S5     found = S4·cmp     dfound = S3·kvalue
```

| state | code | meaning | leaves when | to | outputs on that move |
|---|---|---|---|---|---|
| S0 | 000 | idle | `ready` | S1 | `reset_K` |
| S1 | 001 | word and library load | `load` | S2 | |
| S2 | 010 | X = R(I), the current segment | always | S3 | |
| S3 | 011 | K past the last entry? | `kvalue` / else | S2 / S4 | `dfound`, `incr_I`, `reset_K` / none |
| S4 | 100 | Y(K) = X? | `cmp` / else | S6 / S5 | `found` / none |
| S5 | 101 | increment K | always | S3 | `incr_K` |
| S6 | 110 | wait for the player | `player_done` | S7 | |
| S7 | 111 | increment I | always | S2 | `incr_I`, `reset_K` |

All outputs are Mealy outputs: they are combinational and valid in the cycle the
transition is taken. The datapath acts on them at the next clock edge.

**Search timing.** Every library entry that misses costs three cycles: S3, S4, then S5.
A segment whose phone sits at entry k is matched 3k + 2 cycles after the controller
enters S2. `found` is high in that cycle, and `starting_address` holds the new address
from the next cycle on. If a segment is missing from the library, the scan runs through
every entry. `dfound` then pulses 3·2^ADDR_W + 1 cycles after S2, and the segment is
skipped. With the default 256 entries, the worst case is 769 cycles per segment. The
playing time of the recordings dominates in any real use.

**End of a word.** The state machine has no "word finished" state. After the last
segment it goes back to S2 and keeps scanning, and only `reset` returns it to S0. In
this design the queue raises `word_done` once no segment is left. While `word_done` is
high, `cmp` and the top-level `dfound` are held at 0, so nothing more is reported. To
start a new word, pulse `reset`, reload the library if needed, and go through
`ready` / `load` / `control` again.

## Datapath details

- **Segment queue.** While `control` is 0, the queue copies the target word and sets
  its segment index I to 0. While `control` is 1, it holds the word and presents
  segment I, first letters first. `incr_I` advances I. A segment made of two zero bytes
  counts as the end of the word. Shorter words are therefore given zero-padded, for
  example `{"bone", 16'h0}`. A word with an odd number of letters ends in a segment of
  one letter and one NUL, and the library needs an entry for that segment.
- **Library (`phone_ram`).** There are 2^ADDR_W entries, 256 by default. Each entry is
  `{phone[34:19], start_address[18:0]}`. Reads are asynchronous, addressed by K.
  Writes use a separate port (`lib_we`, `lib_waddr`, `lib_wdata`) and take effect only
  while `sel` is 0. At the top level `sel` is the `load` input, so the library can be
  written only before `load` rises. Entries that are not written hold no defined value,
  so write every entry, or fill unused ones with a phone that never occurs in a word.
  The search returns the *lowest* matching entry.
- **Counter K.** The counter is ADDR_W + 1 bits wide, so it can reach 2^ADDR_W, one
  past the last entry. `kvalue` is its top bit. `reset_K` takes priority over
  `incr_K`, and the count stops at 2^ADDR_W.
- **Output module.** A 19-bit register that loads the matching entry's address when
  `found` is 1 and holds it while the player runs.
- **Input module.** A 4:1 multiplexer on `shift`. Codes 01, 10 and 11 select the
  built-in words "bamite", "devote" and "gemini", which are parameters. Code 00 selects
  `ext_word`. Characters are 8-bit ASCII with the first letter in bits [47:40].

## Top-level interface (`tts_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `reset` | in | 1 | rising-edge clock; synchronous active-high reset |
| `ready` | in | 1 | start: S0 → S1 |
| `load` | in | 1 | 0 while word and library are loaded; 1 when loading is done |
| `control` | in | 1 | 0: the queue takes the word; 1: it presents segments |
| `done` | in | 1 | `player_done` from the audio player (a one-cycle pulse is enough) |
| `shift`, `ext_word` | in | 2, 48 | word selection |
| `lib_we`, `lib_waddr`, `lib_wdata` | in | 1, ADDR_W, 35 | library write port |
| `starting_address` | out | 19 | recording start address for the player |
| `found` | out | 1 | one-cycle strobe: segment matched; start the player |
| `dfound` | out | 1 | one-cycle strobe: segment not in the library |
| `word_done` | out | 1 | every segment has been handled |
| `state` | out | 3 | controller state, for observation |

The one parameter is `ADDR_W`, the library address width. The default is 8, which
gives 256 entries. `ADDR_W = 4` gives a 16-entry library, the size used to introduce
the architecture.

Typical sequence:

1. Hold `reset` for one cycle.
2. With `load = 0`, write the library and set `shift` / `ext_word`.
3. Raise `ready`.
4. Raise `load` and `control`.
5. For each `found` pulse, start the player at `starting_address` and pulse `done`
   when its recording ends.

## Where this design departs from, or adds to, its source description

The controller equations, the state codes, the widths (48-bit word, 16-bit
phone/segment, 19-bit start address, 35-bit entry) and the block split all follow the
original description. These points are this design's own:

- **Library size.** The architecture is introduced with a 16-entry library and a 4-bit
  address. The implemented version uses an 8-bit address and 256 entries. The default
  here is 256.
- **Counter width.** The scan counter has one bit more than the address, so that "K
  has reached the end" can be represented.
- **Library loading.** How the library is loaded is not specified. This design adds
  the write port, gated by `sel`. It also drives `sel` from `load`.
- **Added signals.** `found`, `word_done` and `state` are extra outputs. The end-of-word
  masking of `cmp` and `dfound` is also added.
- **Registers and reset.** The library's entry layout (phone in the upper bits) is a
  choice made here. So are asynchronous reads, synchronous reset, and the master reset
  reaching the datapath registers.
- **Input module.** This module is described only as a multiplexer. The mapping of
  codes to words follows the select values shown next to the three test words. The
  `ext_word` input is added.
- **Longest-match parsing is not included.** The software version of the algorithm
  first tries 4-letter, then 3-letter, then 2-letter units. The hardware architecture
  uses fixed 2-letter segments only, and so does this RTL.

## Verification

Every module has a self-checking testbench in `tb/` (`<module>_tb.sv`). Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `controller_tb` drives random inputs for 6000 cycles. It compares every next state
  and every output with the equations above, evaluated on the state bits, and requires
  all 13 transitions of the state table to occur.
- `datapath_tb` plays the controller's role over a 256-entry library. It checks `cmp`
  and `kvalue` at every step, and covers a segment that is missing and a zero entry
  after the end of the word.
- `synthesis_system_tb` runs in the 16-entry configuration. It checks start addresses,
  the 3k + 2 match latency, the `dfound` latency and the wait for the player.
- `tts_top_tb` is the end-to-end test at the default size, with no parameter overrides.
  It synthesizes "bamite", "gemini" and "devote" with the start addresses
  7EE00/50540/00000, 52000/3FF00/40000 and 10AA0/25700/00000. It also runs a padded
  four-letter word and a word with a missing segment. Phones are placed at random
  library entries. For every segment it checks the address and the cycle at which it
  is found, and it counts idle waits, load waits, K increments, matches, misses, player
  waits, segment advances and word ends.
- `word_list_tb` is a workload run with a 20-phone library that is loaded once and
  kept across resets. It synthesizes the short words bone, when, vote, byte, dose,
  bane, mine and nine, plus the odd-length "goose", and checks the address and
  latency of every segment.
- `tb/audio_player_model.sv` is a behavioural stand-in for the external player. It
  latches the address on `found`, waits a few cycles and pulses `done`.

To simulate with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/tts_pkg.sv tb/tts_top_tb.sv \
          --top-module tts_top_tb -Mdir obj_tts_top
./obj_tts_top/Vtts_top_tb
```

Replace `tts_top_tb` with any other testbench name to run it instead. Every run takes
well under a second.

Lint: `verilator --lint-only -Wall -Irtl rtl/tts_pkg.sv rtl/tts_top.sv`. The only
warnings are package constants that a given module does not use.
