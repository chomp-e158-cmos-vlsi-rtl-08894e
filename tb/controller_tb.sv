// controller_tb: self-checking test of the game state machine.
//
// The controller is connected to a behavioural model of the board memory
// (combinational read of the one-hot selected word, write at the end of
// ph2). The bench plays random games against a reference board: for every
// key it predicts whether the move is legal (one row, one column, block
// still there), how the board changes (the block and everything below it
// and to its right is eaten), whose turn follows, and when the game ends
// and who wins. It checks the memory contents, the player output, the
// display/scan enables in the waiting state and the cycle counts: 22
// cycles from the check state back to waiting for a legal move, 1 for a
// rejected one. Keys pulsed while a move is being written must be ignored.
module controller_tb;
  import chomp_pkg::*;
  localparam int ROWS = 5, COLS = 9;

  logic ph1 = 0, ph2 = 0, reset;
  logic keypressed;
  logic [ROWS-1:0] key_row, address;
  logic [COLS-1:0] key_col, memread, memwrite;
  logic writeen, readen, updtboard, scanen, win, player;
  int checks = 0, failures = 0;

  // memory model
  logic [COLS-1:0] mem [ROWS];
  always_comb begin
    memread = '0;
    if (readen)
      for (int k = 0; k < ROWS; k++) if (address[k]) memread |= mem[k];
  end
  always @(negedge ph2)
    if (writeen)
      for (int k = 0; k < ROWS; k++) if (address[k]) mem[k] = memwrite;

  controller #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  initial forever begin
    #3 ph1 = 1; #4 ph1 = 0; #3 ph2 = 1; #4 ph2 = 0;
  end

  initial begin
    repeat (200000) @(posedge ph1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [COLS-1:0] board [ROWS];
  logic ref_player, ref_over;
  int n_valid = 0, n_eaten = 0, n_multi = 0, n_ignored = 0;
  int n_win [2] = '{0, 0};

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic new_game();
    reset = 1; keypressed = 0; key_row = '0; key_col = '0;
    repeat (3) @(posedge ph1);
    #1 reset = 0;
    for (int k = 0; k < ROWS; k++) board[k] = '1;
    ref_player = 0; ref_over = 0;
    @(posedge ph1); #1;   // START -> PLAYS
    for (int k = 0; k < ROWS; k++) check(mem[k] == '1, "memory not filled with ones");
    check(scanen && updtboard && readen && !writeen && !win, "waiting-state outputs");
  endtask

  task automatic move(input logic [ROWS-1:0] r1h, input int c, input bit poke);
    logic exp_valid;
    int r, cnt;
    r = -1;
    for (int k = 0; k < ROWS; k++) if (r1h[k]) r = k;
    exp_valid = ($countones(r1h) == 1) && board[r][c];
    if ($countones(r1h) != 1) n_multi++;
    else if (!exp_valid) n_eaten++;
    key_row = r1h; key_col = COLS'(1) << c; keypressed = 1;
    @(posedge ph1); #1;
    keypressed = 0;
    cnt = 1;
    while (!scanen && !win && cnt < 100) begin
      if (poke && cnt == 7) begin keypressed = 1; n_ignored++; end
      else keypressed = 0;
      @(posedge ph1); #1;
      cnt++;
    end
    keypressed = 0;
    if (exp_valid) begin
      n_valid++;
      for (int k = 0; k <= r; k++)
        for (int j = 0; j <= c; j++) board[k][j] = 1'b0;
      if (board[ROWS-1] == '0) ref_over = 1;
      ref_player = ~ref_player;
    end
    check(cnt == (exp_valid ? 23 : 2), $sformatf("move r=%b c=%0d took %0d cycles", r1h, c, cnt));
    for (int k = 0; k < ROWS; k++)
      check(mem[k] == board[k], $sformatf("row %0d = %b, expected %b", k, mem[k], board[k]));
    check(player == ref_player, "player/winner output");
    check(win == ref_over, "win output");
    if (!ref_over) check(scanen && updtboard && !writeen, "back to waiting state");
    if (ref_over) n_win[ref_player]++;
  endtask

  initial begin
    // game 1..3: random play to the end
    for (int g = 0; g < 3; g++) begin
      new_game();
      while (!ref_over) begin
        int kind, c, r;
        kind = $urandom_range(9);
        c = $urandom_range(COLS - 1);
        r = $urandom_range(ROWS - 1);
        if (r == ROWS - 1 && c == COLS - 1 && $urandom_range(7) != 0) continue;
        if (kind == 0) move((ROWS'(1) << r) | (ROWS'(1) << ((r + 2) % ROWS)), c, 0);
        else           move(ROWS'(1) << r, c, kind == 1);
      end
      // after the end, further keys are ignored
      keypressed = 1; @(posedge ph1); #1 keypressed = 0;
      repeat (3) @(posedge ph1); #1;
      check(win && player == ref_player, "game-over state is final");
    end
    // player 1 eats the poison at once: player 2 wins
    new_game();
    move(ROWS'(1) << (ROWS - 1), COLS - 1, 0);
    check(win && player == 1'b1, "player 2 wins after poison on move 1");
    // player 1 moves, player 2 eats the poison: player 1 wins
    new_game();
    move(5'b00001, 0, 0);
    move(ROWS'(1) << (ROWS - 1), COLS - 1, 0);
    check(win && player == 1'b0, "player 1 wins after poison on move 2");
    $display("legal %0d, eaten-block keys %0d, multi-button keys %0d, keys during a move %0d, wins P1 %0d P2 %0d",
             n_valid, n_eaten, n_multi, n_ignored, n_win[0], n_win[1]);
    check(n_valid > 0 && n_eaten > 0 && n_multi > 0 && n_ignored > 0 && n_win[0] > 0 && n_win[1] > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
