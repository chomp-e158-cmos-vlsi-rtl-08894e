// keyreport: records one button press for the controller.
//
// Wraps the column scanner. While scanen is high, the first cycle in which
// a row line is high (after a cycle in which none was) loads the row lines
// and the driven column into lastkey = {row lines, column}, 14 bits for the
// 5x9 board, and raises recorded for exactly one cycle, in the cycle after
// the press was seen. lastkey keeps its value until the next such press.
// A press seen while scanen is low is ignored. Several buttons of the same
// column pressed together give a row field with several ones, which the
// controller rejects.
// Storing the key and pulsing recorded follow the original design; raising
// recorded only when lastkey was actually loaded (not after any row
// activity) is this implementation's choice.
// Timing: all outputs are registers clocked at the rising edge of ph1 and
// cleared by reset (synchronous).
module keyreport #(
  parameter int ROWS = 5,
  parameter int COLS = 9
) (
  input  logic                 ph1,
  input  logic                 reset,
  input  logic                 scanen,
  input  logic [ROWS-1:0]      button,
  output logic [COLS-1:0]      col,
  output logic [ROWS+COLS-1:0] lastkey,
  output logic                 recorded
);

  logic keypress;
  logic seen;  // a row line was high in the previous cycle

  keyscan #(.ROWS(ROWS), .COLS(COLS)) u_scan (
    .ph1     (ph1),
    .reset   (reset),
    .button  (button),
    .col     (col),
    .keypress(keypress)
  );

  logic take;
  assign take = scanen && keypress && !seen;

  always_ff @(posedge ph1) begin
    if (reset) begin
      lastkey  <= '0;
      seen     <= 1'b0;
      recorded <= 1'b0;
    end else begin
      seen     <= keypress;
      recorded <= take;
      if (take) lastkey <= {button, col};
    end
  end

endmodule
