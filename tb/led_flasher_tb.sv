// led_flasher_tb: self-checking test of the player LEDs.
//
// Without win each LED follows its turn flag. With win, the winner's LED
// must alternate every cycle (on and off both seen) while the other LED
// stays off.
module led_flasher_tb;
  logic ph1 = 0, ph2 = 0, reset, win, player1turn, player2turn, p1led, p2led;
  int checks = 0, failures = 0;

  led_flasher dut (.*);

  initial forever begin
    #3 ph1 = 1; #4 ph1 = 0; #3 ph2 = 1; #4 ph2 = 0;
  end

  initial begin
    repeat (2000) @(posedge ph1);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_win(input logic p2);
    logic prev;
    int ons, offs;
    win = 1; player1turn = ~p2; player2turn = p2;
    ons = 0; offs = 0;
    #1 prev = p2 ? p2led : p1led;
    for (int i = 0; i < 20; i++) begin
      @(posedge ph1); #1;
      checks++;
      if ((p2 ? p2led : p1led) === prev) begin
        failures++;
        $display("winner LED did not toggle");
      end
      prev = p2 ? p2led : p1led;
      if (prev) ons++; else offs++;
      checks++;
      if ((p2 ? p1led : p2led) !== 1'b0) begin failures++; $display("loser LED lit"); end
    end
    checks++;
    if (ons == 0 || offs == 0) begin failures++; $display("no flashing"); end
  endtask

  initial begin
    reset = 1; win = 0; player1turn = 1; player2turn = 0;
    repeat (2) @(posedge ph1);
    #1 reset = 0;
    for (int i = 0; i < 30; i++) begin
      player1turn = 1'($urandom); player2turn = ~player1turn;
      @(posedge ph1); #1;
      checks++;
      if (p1led !== player1turn || p2led !== player2turn) begin
        failures++;
        $display("turn LEDs wrong: %b%b", p1led, p2led);
      end
    end
    run_win(1'b0);
    run_win(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
