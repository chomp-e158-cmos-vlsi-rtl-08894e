// led_counter: time-multiplexed drive of the 5x9 LED board.
//
// While updtboard is high the counter owns the memory address: address is a
// one-hot row select that moves one row down (4, 3, 2, 1, 0, then 4 again)
// every clock cycle, and the memory word read at that address is shown on
// the column LEDs (led_col, 1 = lit) while the matching row line (led_row,
// active low) is pulled low. With 5 rows the whole board is refreshed every
// 5 cycles, so a clock of at least 500 Hz gives the 100 Hz refresh the
// display needs. While updtboard is low the counter holds and both LED
// buses are zero, so nothing is lit. Reset selects row 0. A register that
// is not one-hot (only possible without reset) returns to the top row.
// Row order, active-low rows and the reset row follow the original design.
// Timing: address changes at the rising edge of ph1; led_col and led_row
// are combinational from address, memread and updtboard.
module led_counter #(
  parameter int ROWS = 5,
  parameter int COLS = 9
) (
  input  logic            ph1,
  input  logic            reset,
  input  logic            updtboard,
  input  logic [COLS-1:0] memread,
  output logic [ROWS-1:0] address,
  output logic [COLS-1:0] led_col,
  output logic [ROWS-1:0] led_row
);

  localparam logic [ROWS-1:0] TOP = ROWS'(1) << (ROWS - 1);

  logic onehot;
  assign onehot = (address != '0) && ((address & (address - ROWS'(1))) == '0);

  always_ff @(posedge ph1) begin
    if (reset)          address <= ROWS'(1);
    else if (updtboard) address <= onehot ? {address[0], address[ROWS-1:1]} : TOP;
  end

  assign led_col = updtboard ? memread  : '0;
  assign led_row = updtboard ? ~address : '0;

endmodule
