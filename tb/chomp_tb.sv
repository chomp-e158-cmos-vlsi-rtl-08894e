// chomp_tb: end-to-end test of the Chomp chip core at its full 5x9 size.
//
// A model of the off-chip button matrix pulls row line r high while column
// c is driven and button (r,c) is held; a monitor reads the multiplexed LED
// display every cycle. Each key is held for exactly one column sweep.
//
// Game 1 replays a recorded 35-key game (legal moves, keys on eaten blocks,
// ending with player 2 eating the poisoned block, so player 1 wins).
// Game 2 eats the poisoned block on the first move (player 2 wins).
// Game 3 is random play to the end, with some two-button presses in one
// column, which must be rejected.
//
// Checked against a reference board: every displayed row (active-low row
// select, column data), the player LEDs during play, the time the display
// is dark for a move (22 cycles for a legal move, 1 for a rejected key),
// the flashing of the winner's LED and the winner. Each mechanism (legal
// move, eaten-block key, two-button key, display of every row, win of each
// player, flashing) is counted and must occur at least once.
module chomp_tb;
  localparam int ROWS = 5, COLS = 9;

  logic ph1 = 0, ph2 = 0, reset;
  logic [ROWS-1:0] row_button, row_LED;
  logic [COLS-1:0] column_button, column_LED;
  logic player1, player2;
  int checks = 0, failures = 0;

  chomp dut (.*);

  initial forever begin
    #3 ph1 = 1; #4 ph1 = 0; #3 ph2 = 1; #4 ph2 = 0;
  end

  initial begin
    repeat (100000) @(posedge ph1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // button matrix model
  logic [COLS-1:0] held [ROWS];
  always_comb
    for (int r = 0; r < ROWS; r++) row_button[r] = |(held[r] & column_button);

  // reference model
  logic [COLS-1:0] board [ROWS];
  logic ref_player, ref_over;
  logic pending;
  int   pend_r, pend_c;
  int   off_len = 0, last_off = 0, offs_done = 0;
  int   n_legal = 0, n_eaten = 0, n_multi = 0, n_flash = 0, n_rows_shown = 0;
  int   n_win [2] = '{0, 0};
  logic [ROWS-1:0] rows_seen = '0;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // display monitor: samples the LED pins once per cycle
  always @(posedge ph1) begin
    #2;
    if (!reset) begin
      if (row_LED == '0) begin
        if (pending) begin
          for (int k = 0; k <= pend_r; k++)
            for (int j = 0; j <= pend_c; j++) board[k][j] = 1'b0;
          if (board[ROWS-1] == '0) ref_over = 1'b1;
          ref_player = ~ref_player;
          pending = 1'b0;
        end
        off_len++;
      end else begin
        int k;
        k = -1;
        for (int i = 0; i < ROWS; i++) if (!row_LED[i]) k = i;
        if (off_len > 0) begin
          last_off = off_len;
          off_len  = 0;
          offs_done++;
        end
        check($countones(~row_LED) == 1, $sformatf("row select %b not one row", row_LED));
        if (k >= 0) begin
          check(column_LED == board[k], $sformatf("row %0d shows %b, board %b", k, column_LED, board[k]));
          rows_seen[k] = 1'b1;
          n_rows_shown++;
        end
        if (!ref_over)
          check(player1 == ~ref_player && player2 == ref_player, "turn LEDs");
      end
    end
  end

  task automatic new_game();
    reset = 1;
    for (int r = 0; r < ROWS; r++) held[r] = '0;
    pending = 0;
    repeat (3) @(posedge ph1);
    #1 reset = 0;
    for (int k = 0; k < ROWS; k++) board[k] = '1;
    ref_player = 0; ref_over = 0;
    repeat (12) @(posedge ph1);
    off_len = 0; offs_done = 0;
    #1;
  endtask

  // hold the buttons in keys[] (bit r*COLS+c) for one sweep
  task automatic key(input logic [ROWS*COLS-1:0] keys);
    int n, r, c, n_before, t;
    logic exp_legal;
    n = $countones(keys); r = 0; c = 0;
    for (int i = 0; i < ROWS * COLS; i++) if (keys[i]) begin r = i / COLS; c = i % COLS; end
    exp_legal = (n == 1) && board[r][c];
    if (n > 1) n_multi++;
    else if (!exp_legal) n_eaten++;
    else n_legal++;
    pending = exp_legal; pend_r = r; pend_c = c;
    n_before = offs_done;
    for (int i = 0; i < ROWS * COLS; i++) if (keys[i]) held[i / COLS][i % COLS] = 1'b1;
    repeat (COLS) @(posedge ph1);
    #1;
    for (int k = 0; k < ROWS; k++) held[k] = '0;
    t = 0;
    while (offs_done == n_before && t < 60) begin
      @(posedge ph1); #3;
      t++;
    end
    check(offs_done == n_before + 1, $sformatf("key r=%0d c=%0d n=%0d: display went dark %0d times", r, c, n, offs_done - n_before));
    check(last_off == (exp_legal ? 22 : 1), $sformatf("key r=%0d c=%0d: display dark %0d cycles", r, c, last_off));
    check(!pending, "legal move never started");
  endtask

  function automatic logic [ROWS*COLS-1:0] k1(input int r, input int c);
    return (ROWS*COLS)'(1) << (r * COLS + c);
  endfunction

  task automatic check_end(input logic winner);
    int on = 0, off = 0;
    logic prev;
    check(ref_over, "game should be over");
    #1 prev = winner ? player2 : player1;
    for (int i = 0; i < 12; i++) begin
      @(posedge ph1); #3;
      check((winner ? player2 : player1) != prev, "winner LED does not flash");
      prev = winner ? player2 : player1;
      if (prev) on++; else off++;
      check((winner ? player1 : player2) == 1'b0, "loser LED lit");
    end
    if (on > 0 && off > 0) n_flash++;
    check(ref_player == winner, "winner");
    n_win[winner]++;
    check(board[ROWS-1] == '0, "top row empty at the end");
  endtask

  // recorded game: {row, column} of each key
  int game1 [35][2] = '{
    '{0,0}, '{1,0}, '{2,0}, '{3,0}, '{4,1}, '{3,0}, '{2,1}, '{1,0}, '{2,0}, '{3,0},
    '{4,1}, '{4,1}, '{3,2}, '{3,2}, '{2,2}, '{3,2}, '{3,2}, '{4,2}, '{4,2}, '{3,2},
    '{4,2}, '{4,2}, '{4,3}, '{4,4}, '{3,3}, '{2,4}, '{1,5}, '{1,4}, '{0,5}, '{0,4},
    '{0,6}, '{1,7}, '{0,8}, '{0,7}, '{4,8}};

  initial begin
    reset = 1;
    for (int r = 0; r < ROWS; r++) held[r] = '0;
    // game 1
    new_game();
    for (int i = 0; i < 35; i++) key(k1(game1[i][0], game1[i][1]));
    check_end(1'b0);
    // game 2: poisoned block first
    new_game();
    key(k1(ROWS - 1, COLS - 1));
    check_end(1'b1);
    for (int k = 0; k < ROWS; k++) check(board[k] == '0, "board empty after poison");
    // game 3: random play with some two-button keys
    new_game();
    while (!ref_over) begin
      int r, c;
      r = $urandom_range(ROWS - 1);
      c = $urandom_range(COLS - 1);
      if (r == ROWS - 1 && c == COLS - 1 && $urandom_range(5) != 0) continue;
      if ($urandom_range(7) == 0) key(k1(r, c) | k1((r + 1) % ROWS, c));
      else if (board[r][c] || $urandom_range(3) == 0) key(k1(r, c));
    end
    check_end(ref_player);
    $display("legal %0d, eaten-block keys %0d, two-button keys %0d, rows shown %0d (%b), flashing %0d, wins P1 %0d P2 %0d",
             n_legal, n_eaten, n_multi, n_rows_shown, rows_seen, n_flash, n_win[0], n_win[1]);
    check(n_legal > 0, "no legal move");
    check(n_eaten > 0, "no eaten-block key");
    check(n_multi > 0, "no two-button key");
    check(rows_seen == '1, "not every row displayed");
    check(n_flash > 0, "no flashing seen");
    check(n_win[0] > 0 && n_win[1] > 0, "both players must win once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
