// keyscan: column scanner for the 5x9 button matrix.
//
// The chip drives one column of the matrix at a time (col, one-hot) and
// reads the ROWS row lines (button); a pressed button in the driven column
// pulls its row line high. The driven column moves one place to the right
// (towards column 0) every clock cycle and wraps from column 0 back to
// column COLS-1, so a full sweep takes COLS cycles. keypress is high in a
// cycle in which any row line is high, i.e. while a pressed button's
// column is being driven. Reset starts the sweep at column COLS-1. A
// register that is not one-hot (only possible without reset) returns to
// column COLS-1 on the next cycle.
// Scan order follows the original design; there is no debouncer, the clock
// frequency is relied on instead.
// Timing: col changes at the rising edge of ph1; keypress is combinational.
module keyscan #(
  parameter int ROWS = 5,
  parameter int COLS = 9
) (
  input  logic            ph1,
  input  logic            reset,
  input  logic [ROWS-1:0] button,
  output logic [COLS-1:0] col,
  output logic            keypress
);

  localparam logic [COLS-1:0] FIRST = COLS'(1) << (COLS - 1);

  logic onehot;
  assign onehot = (col != '0) && ((col & (col - COLS'(1))) == '0);

  always_ff @(posedge ph1) begin
    if (reset || !onehot) col <= FIRST;
    else                  col <= {col[0], col[COLS-1:1]};
  end

  assign keypress = |button;

endmodule
