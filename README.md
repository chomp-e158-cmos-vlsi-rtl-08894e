# Chomp game chip

Chomp is a two-player strategy game on a rectangular board of blocks. The
players take turns picking a block that is still on the board. The picked
block is eaten, and so is every block below it and to its right. The top-left
block is poisoned, and whoever eats it loses.

This RTL is the core of a small custom chip that referees Chomp on a 5 x 9 board:

- The board is shown on a 5 x 9 LED matrix. A lit LED is a block still on the board.
- Moves come from a 5 x 9 button matrix.
- Two more LEDs show whose turn it is. At the end, the winner's LED flashes.
- The whole game state is 45 bits, one per block. It is kept in a small
  custom memory of 12-transistor SRAM cells: five 9-bit words, one per board row.
- A single state machine reads and rewrites that memory one row at a time.
  It shares the memory with the LED multiplexer.

## Board orientation

| | index | position on the board |
|---|---|---|
| row 4 | memory word 4 | top row |
| row 0 | memory word 0 | bottom row |
| column 8 | bit 8 of a word | left column |
| column 0 | bit 0 of a word | right column |

The poisoned block is therefore row 4, column 8. Picking block (r, c) clears
bits 0..c of words 0..r. The game ends as soon as word 4 (the top row) is all
zeros. The top row can only empty when the poisoned block is eaten. The player
who made that move loses.

## Block structure

```
chomp                      chip core (pins of the 40-pin package, minus power)
├── chomp_synth            all standard-cell logic
│   ├── controller         game state machine
│   ├── keyreport          records one key press
│   │   └── keyscan        column scanner of the button matrix
│   ├── led_counter        row multiplexer of the LED matrix
│   ├── led_flasher        the two player LEDs
│   └── (address mux)      memory address: LED counter or controller
└── full_memory            45-bit board memory
    ├── wordline_logic     5 x wordline_bitcell: per-word read/write enables
    └── sram_array         5 x sram_word9: 9 x sram_cell (12T cell)
```

`chomp_pkg` holds the board size (`CHOMP_ROWS = 5`, `CHOMP_COLS = 9`) and
the controller's state type. Every module has the parameters `ROWS` and
`COLS`, which default to 5 and 9.

## Clocking and the memory timing

The chip runs on two non-overlapping clock phases, `ph1` and `ph2`. In this
RTL, every register is a flip-flop that updates at the rising edge of `ph1`.
That matches a master/slave latch pair with the master on `ph2` and the slave
on `ph1`. Reset is synchronous and active high.

`ph2` is used only by the memory:

- **Write.** `wordline_bitcell` makes the write enable of a word as
  NAND(wordline, ph2, writeen), followed by an inverter. The read enable is
  NAND(wordline, readen), followed by an inverter. Both polarities go to the
  cells.
- **Cell.** Each `sram_cell` is a level-sensitive latch. It is transparent
  while its word's write enable is high, which happens only inside a `ph2`
  pulse. The controller changes its outputs at the rising edge of `ph1`, so
  address and data are stable for the whole `ph2` pulse. The written value is
  held when `ph2` falls.
- **Read.** Reading is purely combinational. In silicon the read bit lines are
  a shared tristate bus. Here, a word that is not being read drives zeros, and
  the array ORs the words together. This gives the same value as long as only
  one word is read at a time.
- **Multi-word writes are allowed.** Several words may be written at once. The
  controller uses an all-ones word select right after reset to fill the whole
  board with ones.

Clocking the memory on `ph2` is essential. If the write strobe is not gated by
`ph2`, a word can be written while the address is still changing.

## A move, cycle by cycle

The controller (`controller.sv`) spends most of its time in `S_PLAYS`. In that
state:

- the display is on (`updtboard = 1`);
- the LED counter owns the memory address;
- the key reporter may record a key (`scanen = 1`).

A recorded key starts this sequence, one state per `ph1` cycle:

| cycles | state | memory access | what happens |
|---|---|---|---|
| 1 | `S_CHECK_MOVE` | read the pressed row | The move is legal if exactly one row line was high and the pressed block is still 1. If not, go back to `S_PLAYS`: same player, nothing changed. |
| 4 per row, rows 4 down to 0 | `S_MEM_READ` | read row k | The row is stored in `lastmemread`. |
| | `S_BUF_READ` | none | new row = `lastmemread`, with columns 0..c cleared if k ≤ r |
| | `S_MEM_WRITE` | write row k | The new row is written during `ph2`. |
| | `S_BUF_WRITE` | none | |
| 1 | `S_CHECK_WIN` | read row 4 | The turn passes to the other player. If row 4 is empty, go to `S_WINS` with that player as the winner. |

Timing:

- A legal move takes 22 cycles, from `S_CHECK_MOVE` back to `S_PLAYS`.
- A rejected key takes 1 cycle.
- The display is dark for exactly that long, because `updtboard` is 0 outside
  `S_PLAYS` and `S_WINS`.
- Every row is rewritten, even rows the move does not touch.
- Keys that arrive while a move is being written are ignored.
- `S_WINS` is final until reset.

The `player` output is 0 while it is player 1's turn and 1 for player 2. In
`S_WINS` it names the winner.

## Key scanning: what counts as a key

`keyscan` drives one column of the button matrix at a time (`column_button`,
one-hot):

- It starts at column 8 and moves one column to the right every cycle,
  wrapping around.
- A pressed button in the driven column pulls its row line (`row_button`) high.

`keyreport` watches the row lines while `scanen` is high:

- In the first cycle in which some row line is high, it stores
  `{row lines, column}` (14 bits) in `lastkey`.
- In the next cycle it pulses `recorded`.

Consequences:

- **Held buttons repeat.** A held button is seen once per 9-cycle sweep, so it
  is reported again on every sweep. A repeat report refers to a block that has
  just been eaten, so the controller rejects it.
- **No debouncing.** There is no debouncer. Bouncing is handled only by
  choosing a slow enough clock.
- **Two buttons in one column.** The row field has two bits set, and the
  controller rejects the key.
- **Two buttons in different columns.** These are seen as two separate
  presses, in scan order. They are not flagged as an invalid input.

## Display and player LEDs

`led_counter` steps a one-hot row address through rows 4, 3, 2, 1, 0, one row
per cycle, while `updtboard` is high. Meanwhile:

- the memory word at that address appears on `column_LED` (1 = lit);
- the row's line on `row_LED` is pulled low (active low).

Five rows per refresh means the clock must run at 500 Hz or more for the
100 Hz refresh the display needs. When the display is off, both LED buses are
0.

`led_flasher` drives the player LEDs:

- During play, they show whose turn it is.
- In `S_WINS`, the winner's LED toggles every clock cycle and the other LED is
  off.

## Pins of `chomp`

| pin | dir | width | function |
|---|---|---|---|
| `ph1`, `ph2` | in | 1 | non-overlapping clock phases |
| `reset` | in | 1 | synchronous, active high; clears the board to all ones and starts with player 1 |
| `row_button` | in | 5 | row lines of the button matrix |
| `column_button` | out | 9 | one-hot column drive of the button matrix |
| `column_LED` | out | 9 | LED data of the row being shown |
| `row_LED` | out | 5 | LED row select, active low; all zero when the display is off |
| `player1`, `player2` | out | 1 | turn LEDs, flashing for the winner |

The package's power and ground pins and its I/O pad cells are not part of
this RTL.

## Departures from the original design, and choices where it was silent

Most of the behaviour follows the original design closely. These are the
differences:

- **Clocking.** Registers are edge-triggered `ph1` flip-flops instead of
  two-phase latch pairs. The cycle behaviour is the same.
- **Multi-button keys.** Two buttons pressed in the same column are rejected.
  The original logic picked the highest row.
- **Controller encoding.** The controller is written as an enum state plus a
  row counter and a player bit. The original has one named state for every
  row, phase and player. The cycle sequence is unchanged.
- **Player LED during a move.** The player output is held for the whole move.
  The original briefly showed player 1 during player 2's buffer cycles.
- **`recorded` pulse.** `recorded` pulses only when a key was actually stored.
  In the original, it pulsed after any row activity, even with scanning
  disabled.
- **Flash rate.** The flash rate is one toggle per clock, as in the original.
  At a few-hundred-hertz clock this is faster than the eye can follow. A
  clock divider would be needed for a visible blink.
- **Read bus.** The memory's tristate read bus is modelled as an OR of words
  that drive zero when they are not read.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `sram_cell_tb` | latch and read gating for random enable combinations |
| `sram_word9_tb`, `sram_array_tb` | random writes and reads against a reference array; all-ones fill |
| `wordline_bitcell_tb`, `wordline_logic_tb` | gate equations, exhaustively or randomly |
| `full_memory_tb` | writes happen only through the `ph2` pulse; reads against a reference array |
| `keyscan_tb` | scan order and period; keypress |
| `keyreport_tb` | one report per sweep; stored key; scan disable; two buttons in one column |
| `led_counter_tb`, `led_flasher_tb` | row order, hold, LED buses; turn LEDs and flashing |
| `controller_tb` | random games against a behavioural memory (see below) |
| `chomp_synth_tb` | the logic block with a behavioural memory, same scenario as `chomp_tb` |
| `chomp_tb` | the whole core at its default 5 x 9 size (see below) |
| `chomp_example_tb` | the whole core built for a 3 x 5 board, playing the small example game below |

`controller_tb` plays random games against a behavioural memory. It checks:

- the board after every move;
- the 22-cycle and 1-cycle timing;
- that rejected keys leave the board unchanged;
- that keys pressed during a move are ignored;
- both winners.

`chomp_tb` runs the whole core at its default size with a model of the button
matrix. It plays three games:

1. A recorded 35-key game, including keys on eaten blocks. It ends with
   player 1 winning.
2. The poisoned block eaten on the first move, so player 2 wins.
3. Random play, including two-button keys.

Throughout, it checks every displayed LED row against a reference board, the
turn LEDs, the dark time of each move, and the winner's flashing. It also
counts that each of these mechanisms happened at least once.

`chomp_example_tb` builds the core with `ROWS = 3`, `COLS = 5` and plays this
game (row 2 on top, column 4 on the left, poison at (2,4)):

1. A eats (1,0), the right block of the two lower rows.
2. B eats (0,3), all of the bottom row except its left block.
3. A eats (2,3), everything right of the left column.
4. B eats (1,4), the left column below the poison.
5. A has only the poisoned block left, eats it and loses.

It checks the displayed board after each move against these rows. It also
checks the move time, which at this size is 4 x 3 + 2 = 14 cycles.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/chomp_pkg.sv tb/chomp_tb.sv --top-module chomp_tb
./obj_dir/Vchomp_tb
```

Replace `chomp_tb` with any other testbench name. The full-size game test
finishes in a few seconds.

## Changing the design

- **Board size.** `ROWS` and `COLS` set the board size throughout. A legal
  move takes 4 x `ROWS` + 2 cycles. The sizes tested are 5 x 9 and 3 x 5
  (`chomp_example_tb`). `keyreport`'s key register is `ROWS + COLS` bits wide.
- **Player LEDs.** To change how they behave, edit `led_flasher.sv`. The
  controller only supplies `win` and `player`.
- **Memory timing.** The controller assumes a memory with combinational reads
  and writes within one `ph2` pulse. If you use a synchronous RAM instead, the
  buffer states give one spare cycle around every access, but the read in
  `S_CHECK_MOVE` and `S_CHECK_WIN` is used in the same cycle.
