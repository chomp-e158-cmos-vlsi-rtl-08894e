// chomp_example_tb: the Chomp core built for a 3 x 5 board, playing the
// classic small example game to its end.
//
// The core is instantiated with ROWS = 3 and COLS = 5, so this test also
// covers the board-size parameters away from their 5 x 9 defaults. Row 2 is
// the top row and column 4 the left column; the poisoned block is (2,4).
//
// The game, with player A on the player-1 LED:
//   A eats (1,0): the right block of the two lower rows,
//   B eats (0,3): all of the bottom row except its left block,
//   A eats (2,3): everything right of the left column,
//   B eats (1,4): the left column below the poison,
//   A is left with the poisoned block, eats it and loses.
// After every move the displayed board is compared with the expected rows
// (written out below, independently of any model), and the time the display
// is dark is checked: 1 + 4 * ROWS + 1 = 14 cycles for a legal move at this
// size. A key on an eaten block is also tried once (1 dark cycle, no change).
module chomp_example_tb;
  localparam int ROWS = 3, COLS = 5;
  localparam int MOVE_CYCLES = 4 * ROWS + 2;

  logic ph1 = 0, ph2 = 0, reset;
  logic [ROWS-1:0] row_button, row_LED;
  logic [COLS-1:0] column_button, column_LED;
  logic player1, player2;
  int checks = 0, failures = 0;

  chomp #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  initial forever begin
    #3 ph1 = 1; #4 ph1 = 0; #3 ph2 = 1; #4 ph2 = 0;
  end

  initial begin
    repeat (5000) @(posedge ph1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // button matrix model
  logic [COLS-1:0] held [ROWS];
  always_comb
    for (int r = 0; r < ROWS; r++) row_button[r] = |(held[r] & column_button);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // display monitor: the last row shown for each row address, and the length
  // of the last dark stretch of the display
  logic [COLS-1:0] shown [ROWS];
  int off_len = 0, last_off = 0, offs_done = 0;
  always @(posedge ph1) begin
    #2;
    if (!reset) begin
      if (row_LED == '0) off_len++;
      else begin
        if (off_len > 0) begin
          last_off = off_len;
          off_len  = 0;
          offs_done++;
        end
        check($countones(~row_LED) == 1, $sformatf("row select %b not one row", row_LED));
        for (int i = 0; i < ROWS; i++) if (!row_LED[i]) shown[i] = column_LED;
      end
    end
  end

  // press (r,c) for one column sweep and wait for the display to come back
  task automatic press(input int r, input int c, input int dark);
    int n_before, t;
    n_before = offs_done;
    held[r][c] = 1'b1;
    repeat (COLS) @(posedge ph1);
    #1 held[r][c] = 1'b0;
    t = 0;
    while (offs_done == n_before && t < 40) begin
      @(posedge ph1); #3;
      t++;
    end
    if (dark == 0) begin
      check(offs_done == n_before && off_len == 0, $sformatf("key (%0d,%0d) after the game turned the display off", r, c));
    end else begin
      check(offs_done == n_before + 1, $sformatf("key (%0d,%0d): display went dark %0d times", r, c, offs_done - n_before));
      check(last_off == dark, $sformatf("key (%0d,%0d): dark %0d cycles, expected %0d", r, c, last_off, dark));
    end
    // let every row be shown again
    repeat (ROWS + 1) @(posedge ph1);
    #3;
  endtask

  task automatic expect_board(input logic [COLS-1:0] top, mid, bot, input logic turn_b, input string step);
    check(shown[2] == top && shown[1] == mid && shown[0] == bot,
          $sformatf("%s: board %b/%b/%b, expected %b/%b/%b", step, shown[2], shown[1], shown[0], top, mid, bot));
    check(player1 == !turn_b && player2 == turn_b, $sformatf("%s: turn LEDs %b%b", step, player1, player2));
  endtask

  int on = 0, off = 0;
  logic prev;

  initial begin
    reset = 1;
    for (int r = 0; r < ROWS; r++) held[r] = '0;
    repeat (3) @(posedge ph1);
    #1 reset = 0;
    repeat (12) @(posedge ph1);
    #3;
    expect_board(5'b11111, 5'b11111, 5'b11111, 0, "initially");
    press(1, 0, MOVE_CYCLES);
    expect_board(5'b11111, 5'b11110, 5'b11110, 1, "after A");
    press(0, 3, MOVE_CYCLES);
    expect_board(5'b11111, 5'b11110, 5'b10000, 0, "after B");
    press(0, 2, 1);  // already eaten: rejected, still A's turn
    expect_board(5'b11111, 5'b11110, 5'b10000, 0, "after eaten-block key");
    press(2, 3, MOVE_CYCLES);
    expect_board(5'b10000, 5'b10000, 5'b10000, 1, "after A");
    press(1, 4, MOVE_CYCLES);
    expect_board(5'b10000, 5'b00000, 5'b00000, 0, "after B");
    press(2, 4, MOVE_CYCLES);
    // A ate the poison: B (player 2) has won, its LED flashes
    check(row_LED != '0, "display on after the game");
    prev = player2;
    for (int i = 0; i < 10; i++) begin
      @(posedge ph1); #3;
      check(player2 != prev, "winner LED does not flash");
      check(player1 == 1'b0, "loser LED lit");
      prev = player2;
      if (prev) on++; else off++;
    end
    check(on > 0 && off > 0, "flashing");
    check(shown[2] == '0 && shown[1] == '0 && shown[0] == '0, "board empty at the end");
    // the game is over: a further key is ignored
    press(0, 0, 0);
    check(shown[2] == '0 && shown[1] == '0 && shown[0] == '0, "board empty after a key in the won state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
