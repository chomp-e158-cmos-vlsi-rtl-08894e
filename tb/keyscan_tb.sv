// keyscan_tb: self-checking test of the column scanner.
//
// After reset the driven column must be column 8 and then walk one place
// to the right every cycle, wrapping from 0 to 8 (period 9). keypress must
// equal the OR of the row lines, which are driven at random.
module keyscan_tb;
  localparam int ROWS = 5, COLS = 9;
  logic ph1 = 0, ph2 = 0, reset;
  logic [ROWS-1:0] button;
  logic [COLS-1:0] col;
  logic keypress;
  int checks = 0, failures = 0;
  int exp_idx;

  keyscan #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  initial forever begin
    #3 ph1 = 1; #4 ph1 = 0; #3 ph2 = 1; #4 ph2 = 0;
  end

  initial begin
    repeat (2000) @(posedge ph1);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; button = '0;
    repeat (3) @(posedge ph1);
    #1 reset = 0;
    exp_idx = COLS - 1;
    for (int i = 0; i < 100; i++) begin
      button = ROWS'($urandom);
      #1;
      checks++;
      if (col !== COLS'(1) << exp_idx) begin
        failures++;
        $display("cycle %0d: col=%b exp column %0d", i, col, exp_idx);
      end
      checks++;
      if (keypress !== (|button)) begin
        failures++;
        $display("keypress=%b button=%b", keypress, button);
      end
      @(posedge ph1); #1;
      exp_idx = (exp_idx == 0) ? COLS - 1 : exp_idx - 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
