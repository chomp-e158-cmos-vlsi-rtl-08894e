// chomp_pkg: constants and types shared by the Chomp game chip.
//
// The board is 5 rows by 9 columns (45 blocks, 45 LEDs, 45 buttons). Rows
// are numbered 0 (bottom) to 4 (top); columns 0 (right) to 8 (left), so
// the poisoned block is row 4, column 8. Rows and memory words are always
// selected one-hot. The controller state type is an enum whose members
// mirror the phases of the game flow: initialise, wait for a key, check the
// move, rewrite the board row by row, check for a win, game over.
package chomp_pkg;

  localparam int CHOMP_ROWS = 5;
  localparam int CHOMP_COLS = 9;

  typedef enum logic [3:0] {
    S_START      = 4'd0,  // write all ones into every memory word
    S_PLAYS      = 4'd1,  // display the board, wait for a key of the current player
    S_CHECK_MOVE = 4'd2,  // read the pressed row, is the pressed block still there?
    S_MEM_READ   = 4'd3,  // read board row row_idx
    S_BUF_READ   = 4'd4,  // buffer cycle: compute the new row
    S_MEM_WRITE  = 4'd5,  // write the new row back
    S_BUF_WRITE  = 4'd6,  // buffer cycle before the next row
    S_CHECK_WIN  = 4'd7,  // read the top row: empty means the mover lost
    S_WINS       = 4'd8   // game over, winner's LED flashes
  } ctrl_state_t;

endpackage
