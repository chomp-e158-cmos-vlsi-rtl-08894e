// led_counter_tb: self-checking test of the LED row multiplexer.
//
// After reset the row select is row 0; while updtboard is high it must step
// 4, 3, 2, 1, 0, 4, ... one row per cycle, show the memory data on led_col
// and pull exactly the selected row low on led_row. With updtboard low the
// select must hold and both LED buses must be zero.
module led_counter_tb;
  localparam int ROWS = 5, COLS = 9;
  logic ph1 = 0, ph2 = 0, reset, updtboard;
  logic [COLS-1:0] memread, led_col;
  logic [ROWS-1:0] address, led_row;
  int checks = 0, failures = 0;
  int exp_row;

  led_counter #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

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
    reset = 1; updtboard = 0; memread = '0;
    repeat (3) @(posedge ph1);
    #1 reset = 0;
    exp_row = 0;
    for (int i = 0; i < 200; i++) begin
      updtboard = ($urandom_range(3) != 0);
      memread   = COLS'($urandom);
      #1;
      checks++;
      if (address !== ROWS'(1) << exp_row) begin
        failures++;
        $display("cycle %0d: address=%b exp row %0d", i, address, exp_row);
      end
      checks++;
      if (updtboard ? (led_col !== memread || led_row !== ~(ROWS'(1) << exp_row))
                    : (led_col !== '0 || led_row !== '0)) begin
        failures++;
        $display("cycle %0d: upd=%b led_col=%b led_row=%b", i, updtboard, led_col, led_row);
      end
      @(posedge ph1); #1;
      if (updtboard) exp_row = (exp_row == 0) ? ROWS - 1 : exp_row - 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
