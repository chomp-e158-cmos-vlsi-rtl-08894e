// chomp: core of the Chomp game chip (two-player game on a 5x9 board).
//
// Each player in turn picks a block still on the board; that block and
// every block below it and to its right are eaten. Whoever eats the
// poisoned top-left block loses. The board state lives in a 45-bit memory
// of 12-transistor SRAM cells (full_memory), one 9-bit word per row,
// 1 = block still there. Everything else (controller, button scanner,
// LED multiplexer, player LEDs) is in chomp_synth.
//
// Interface: two non-overlapping clock phases ph1/ph2 and an active-high
// synchronous reset; the button matrix is scanned by driving one column
// (column_button, one-hot) and reading the row lines (row_button); the LED
// matrix is multiplexed one row at a time (row_LED active low, column_LED
// active high); player1/player2 show whose turn it is and flash for the
// winner. Registers change at the rising edge of ph1; the memory is written
// during ph2. Edge-triggered ph1 registers stand in for the original
// two-phase latch pairs with the same cycle behaviour; the I/O pad ring is
// not part of this RTL.
module chomp
  import chomp_pkg::*;
#(
  parameter int ROWS = CHOMP_ROWS,
  parameter int COLS = CHOMP_COLS
) (
  input  logic            ph1,
  input  logic            ph2,
  input  logic            reset,
  input  logic [ROWS-1:0] row_button,
  output logic [COLS-1:0] column_button,
  output logic [COLS-1:0] column_LED,
  output logic [ROWS-1:0] row_LED,
  output logic            player1,
  output logic            player2
);

  logic            writeen, readen;
  logic [COLS-1:0] memread, memwrite;
  logic [ROWS-1:0] address;

  chomp_synth #(.ROWS(ROWS), .COLS(COLS)) u_logic (
    .ph1          (ph1),
    .reset        (reset),
    .row_button   (row_button),
    .readen       (readen),
    .writeen      (writeen),
    .address      (address),
    .memwrite     (memwrite),
    .memread      (memread),
    .column_button(column_button),
    .column_LED   (column_LED),
    .row_LED      (row_LED),
    .player1      (player1),
    .player2      (player2)
  );

  full_memory #(.ROWS(ROWS), .COLS(COLS)) u_mem (
    .ph2      (ph2),
    .readen   (readen),
    .writeen  (writeen),
    .wordline (address),
    .writeline(memwrite),
    .readline (memread)
  );

endmodule
