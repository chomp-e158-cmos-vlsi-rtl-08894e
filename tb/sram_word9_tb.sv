// sram_word9_tb: self-checking test of one 9-bit memory word.
//
// Writes random words, changes the write bit lines while the word is not
// enabled (it must hold), and checks that the word reads back its last
// written value when read is enabled and all zeros when it is not.
module sram_word9_tb;
  localparam int COLS = 9;
  logic read_i, read_b_i, write_i, write_b_i;
  logic [COLS-1:0] w, r, ref_word;
  int checks = 0, failures = 0;

  sram_word9 #(.COLS(COLS)) dut (.*);

  task automatic chk(input logic [COLS-1:0] exp, input string what);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("%s: r=%b exp=%b", what, r, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    read_i = 0; read_b_i = 1; write_i = 0; write_b_i = 1; w = '0;
    for (int i = 0; i < 200; i++) begin
      w = COLS'($urandom);
      write_i = 1; write_b_i = 0; #1;
      ref_word = w;
      write_i = 0; write_b_i = 1; #1;
      w = COLS'($urandom); #1;              // bit lines change, word must hold
      chk('0, "not read");
      read_i = 1; read_b_i = 0; #1;
      chk(ref_word, "read back");
      read_i = 0; read_b_i = 1; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
