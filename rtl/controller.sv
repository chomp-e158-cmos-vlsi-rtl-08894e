// controller: the game state machine of the Chomp chip.
//
// Game flow. After reset (state S_START) every memory word is written with
// all ones: every block is on the board. The controller then alternates
// between the players. In S_PLAYS it lets the LED counter refresh the
// display and lets the key reporter record a press. On keypressed it goes
// to S_CHECK_MOVE, reads the pressed row and accepts the move only if
// exactly one row line was high and the pressed block is still on the
// board; otherwise it returns to S_PLAYS for the same player. An accepted
// move rewrites the board one row at a time, top row (ROWS-1) first, with
// four cycles per row: S_MEM_READ (read the row into lastmemread),
// S_BUF_READ, S_MEM_WRITE (write the new row) and S_BUF_WRITE. A row at or
// below the pressed row loses the pressed column and every column to its
// right (lower index); other rows are written back unchanged. S_CHECK_WIN
// reads the top row: if it is empty the player who just moved has eaten the
// poisoned block and the other player wins (S_WINS, final until reset);
// otherwise the turn passes to the other player.
//
// Timing: one accepted move takes 22 cycles from entering S_CHECK_MOVE to
// re-entering S_PLAYS (1 + 4 x 5 + 1). All outputs are decoded from the
// state register, which changes at the rising edge of ph1, so they are
// stable during ph2, when the memory writes. memread is the combinational
// read data of the word selected by address.
//
// The row-by-row rewrite with its buffer cycles, the all-ones fill and the
// win rule follow the original design. Rejecting a key with two row lines
// high, holding the player output through a move, and the compact encoding
// (one state per phase plus a row counter) are this implementation's own.
//
// player: 0 while it is player 1's turn, 1 for player 2; in S_WINS it names
// the winner. address is one-hot, all ones in S_START; while updtboard is
// high the memory address comes from the LED counter instead.
module controller
  import chomp_pkg::*;
#(
  parameter int ROWS = CHOMP_ROWS,
  parameter int COLS = CHOMP_COLS
) (
  input  logic            ph1,
  input  logic            reset,
  input  logic            keypressed,
  input  logic [ROWS-1:0] key_row,
  input  logic [COLS-1:0] key_col,
  input  logic [COLS-1:0] memread,
  output logic            writeen,
  output logic            readen,
  output logic            updtboard,
  output logic            scanen,
  output logic            win,
  output logic [ROWS-1:0] address,
  output logic [COLS-1:0] memwrite,
  output logic            player
);

  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1;

  ctrl_state_t     state;
  logic [RW-1:0]   row_idx;      // board row being rewritten
  logic [COLS-1:0] lastmemread;  // row read in S_MEM_READ

  // Decode of the recorded key.
  logic [ROWS-1:0] rows_hit;     // rows at or below the pressed row
  logic [COLS-1:0] keep_cols;    // columns left of the pressed column
  logic            key_ok;       // exactly one row and one column
  logic            valid;
  logic [COLS-1:0] newrow;
  logic [ROWS-1:0] row_sel;

  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int k = ROWS - 1; k >= 0; k--) begin
      acc         = acc | key_row[k];
      rows_hit[k] = acc;
    end
    acc = 1'b0;
    for (int j = COLS - 1; j >= 0; j--) begin
      acc          = acc | key_col[j];
      keep_cols[j] = ~acc;
    end
  end

  assign key_ok = (key_row != '0) && ((key_row & (key_row - ROWS'(1))) == '0) &&
                  (key_col != '0) && ((key_col & (key_col - COLS'(1))) == '0);
  assign valid   = key_ok && ((memread & key_col) != '0);
  assign row_sel = ROWS'(1) << row_idx;
  assign newrow  = rows_hit[row_idx] ? (lastmemread & keep_cols) : lastmemread;

  // State register and datapath registers.
  always_ff @(posedge ph1) begin
    if (reset) begin
      state       <= S_START;
      row_idx     <= RW'(ROWS - 1);
      player      <= 1'b0;
      lastmemread <= '0;
    end else begin
      unique case (state)
        S_START:      state <= S_PLAYS;
        S_PLAYS:      if (keypressed) state <= S_CHECK_MOVE;
        S_CHECK_MOVE: begin
          row_idx <= RW'(ROWS - 1);
          state   <= valid ? S_MEM_READ : S_PLAYS;
        end
        S_MEM_READ: begin
          lastmemread <= memread;
          state       <= S_BUF_READ;
        end
        S_BUF_READ:   state <= S_MEM_WRITE;
        S_MEM_WRITE:  state <= S_BUF_WRITE;
        S_BUF_WRITE: begin
          if (row_idx == '0) state <= S_CHECK_WIN;
          else begin
            row_idx <= row_idx - RW'(1);
            state   <= S_MEM_READ;
          end
        end
        S_CHECK_WIN: begin
          player <= ~player;
          state  <= (memread == '0) ? S_WINS : S_PLAYS;
        end
        S_WINS:       state <= S_WINS;
        default:      state <= S_START;
      endcase
    end
  end

  // Outputs, decoded from the state.
  always_comb begin
    writeen   = 1'b0;
    readen    = 1'b0;
    updtboard = 1'b0;
    scanen    = 1'b0;
    win       = 1'b0;
    address   = '0;
    memwrite  = '1;
    unique case (state)
      S_START: begin
        writeen = 1'b1;
        address = '1;
      end
      S_PLAYS: begin
        readen    = 1'b1;
        scanen    = 1'b1;
        updtboard = 1'b1;
      end
      S_CHECK_MOVE: begin
        readen  = 1'b1;
        address = key_row;
      end
      S_MEM_READ: begin
        readen  = 1'b1;
        address = row_sel;
      end
      S_BUF_READ, S_BUF_WRITE: memwrite = newrow;
      S_MEM_WRITE: begin
        writeen  = 1'b1;
        address  = row_sel;
        memwrite = newrow;
      end
      S_CHECK_WIN: begin
        readen  = 1'b1;
        address = ROWS'(1) << (ROWS - 1);
      end
      S_WINS: begin
        readen    = 1'b1;
        updtboard = 1'b1;
        win       = 1'b1;
      end
      default: ;
    endcase
  end

  // Memory accesses are one-hot except the initial fill.
  a_onehot_write: assert property (@(posedge ph1) disable iff (reset)
    (writeen && state != S_START) |-> $onehot(address));

endmodule
