// chomp_synth: all standard-cell logic of the Chomp chip in one block.
//
// Holds the controller, the key reporter (with its column scanner), the LED
// counter, the player LED flasher and the multiplexer that gives the memory
// address to the LED counter while the display is on (updtboard) and to the
// controller otherwise. The board memory itself sits outside this block and
// is reached through readen, writeen, address, memwrite and memread.
// Timing: every register is clocked at the rising edge of ph1 with a
// synchronous, active-high reset.
module chomp_synth
  import chomp_pkg::*;
#(
  parameter int ROWS = CHOMP_ROWS,
  parameter int COLS = CHOMP_COLS
) (
  input  logic            ph1,
  input  logic            reset,
  input  logic [ROWS-1:0] row_button,
  output logic            readen,
  output logic            writeen,
  output logic [ROWS-1:0] address,
  output logic [COLS-1:0] memwrite,
  input  logic [COLS-1:0] memread,
  output logic [COLS-1:0] column_button,
  output logic [COLS-1:0] column_LED,
  output logic [ROWS-1:0] row_LED,
  output logic            player1,
  output logic            player2
);

  logic [ROWS+COLS-1:0] lastkey;
  logic                 keypressed, updtboard, scanen, win, player;
  logic [ROWS-1:0]      ctrl_address, led_address;

  controller #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .ph1       (ph1),
    .reset     (reset),
    .keypressed(keypressed),
    .key_row   (lastkey[ROWS+COLS-1:COLS]),
    .key_col   (lastkey[COLS-1:0]),
    .memread   (memread),
    .writeen   (writeen),
    .readen    (readen),
    .updtboard (updtboard),
    .scanen    (scanen),
    .win       (win),
    .address   (ctrl_address),
    .memwrite  (memwrite),
    .player    (player)
  );

  keyreport #(.ROWS(ROWS), .COLS(COLS)) u_keys (
    .ph1     (ph1),
    .reset   (reset),
    .scanen  (scanen),
    .button  (row_button),
    .col     (column_button),
    .lastkey (lastkey),
    .recorded(keypressed)
  );

  led_counter #(.ROWS(ROWS), .COLS(COLS)) u_leds (
    .ph1      (ph1),
    .reset    (reset),
    .updtboard(updtboard),
    .memread  (memread),
    .address  (led_address),
    .led_col  (column_LED),
    .led_row  (row_LED)
  );

  led_flasher u_flash (
    .ph1        (ph1),
    .reset      (reset),
    .win        (win),
    .player1turn(~player),
    .player2turn(player),
    .p1led      (player1),
    .p2led      (player2)
  );

  assign address = updtboard ? led_address : ctrl_address;

endmodule
