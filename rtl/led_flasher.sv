// led_flasher: the two player LEDs.
//
// During the game each LED simply shows whose turn it is. When win is high
// the LED of the winner (the player whose turn flag is set in the game-over
// state) toggles every clock cycle from a one-bit register, and the other
// LED keeps its turn flag (which is 0). Reset clears the toggle register.
// Toggling once per clock follows the original design; at the few-hundred-
// hertz clock the display needs, a visible blink would need a divider.
// Timing: the toggle register changes at the rising edge of ph1; the LED
// outputs are combinational.
module led_flasher (
  input  logic ph1,
  input  logic reset,
  input  logic win,
  input  logic player1turn,
  input  logic player2turn,
  output logic p1led,
  output logic p2led
);

  logic blink;

  always_ff @(posedge ph1) begin
    if (reset) blink <= 1'b0;
    else       blink <= ~blink;
  end

  assign p1led = (win && player1turn) ? blink : player1turn;
  assign p2led = (win && player2turn) ? blink : player2turn;

endmodule
