// keyreport_tb: self-checking test of the key reporter.
//
// A model of the button matrix sets row line r high while the column of a
// held button is driven. For each of the 45 buttons in turn, then for
// random single presses, the reporter must raise recorded for exactly one
// cycle, within one column sweep, and lastkey must hold the one-hot row and
// column of the press. Presses while scanen is low must be ignored. A
// button held for two sweeps is reported twice. Two buttons held in the
// same column must be reported with both row lines set.
module keyreport_tb;
  localparam int ROWS = 5, COLS = 9;
  logic ph1 = 0, ph2 = 0, reset, scanen;
  logic [ROWS-1:0] button;
  logic [COLS-1:0] col;
  logic [ROWS+COLS-1:0] lastkey;
  logic recorded;
  int checks = 0, failures = 0;

  // button matrix model: rows pressed in column press_col
  logic [ROWS-1:0] press_rows;
  int              press_col;
  assign button = (press_rows != '0 && col[press_col]) ? press_rows : '0;

  keyreport #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  initial forever begin
    #3 ph1 = 1; #4 ph1 = 0; #3 ph2 = 1; #4 ph2 = 0;
  end

  initial begin
    repeat (20000) @(posedge ph1);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(input logic [ROWS-1:0] rows, input int c, input logic en,
                       input int sweeps = 1);
    int pulses, first;
    press_rows = rows; press_col = c; scanen = en;
    pulses = 0; first = -1;
    // hold for whole sweeps, then count recorded pulses until quiet
    for (int t = 0; t < sweeps * COLS + 3; t++) begin
      @(posedge ph1); #1;
      if (t == sweeps * COLS - 1) press_rows = '0;
      if (recorded) begin
        pulses++;
        if (first < 0) first = t;
      end
    end
    press_rows = '0;
    repeat (2) @(posedge ph1);
    #1;
    checks++;
    if (pulses != (en ? sweeps : 0)) begin
      failures++;
      $display("rows=%b col=%0d en=%b: %0d recorded pulses", rows, c, en, pulses);
    end
    if (en) begin
      checks++;
      if (lastkey !== {rows, COLS'(1) << c}) begin
        failures++;
        $display("lastkey=%b exp %b", lastkey, {rows, COLS'(1) << c});
      end
      checks++;
      if (first > COLS) begin
        failures++;
        $display("press recorded late (%0d cycles)", first);
      end
    end
  endtask

  initial begin
    logic [ROWS+COLS-1:0] keep;
    reset = 1; scanen = 0; press_rows = '0; press_col = 0;
    repeat (3) @(posedge ph1);
    #1 reset = 0;
    // every one of the 45 buttons must be captured
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        press(ROWS'(1) << r, c, 1'b1);
    for (int i = 0; i < 20; i++)
      press(ROWS'(1) << $urandom_range(ROWS - 1), $urandom_range(COLS - 1), 1'b1);
    keep = lastkey;
    press(5'b00100, 3, 1'b0);
    checks++;
    if (lastkey !== keep) begin failures++; $display("lastkey changed while scanen low"); end
    press(5'b10010, 6, 1'b1);
    // a button held for two sweeps is reported once per sweep
    press(5'b01000, 1, 1'b1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
