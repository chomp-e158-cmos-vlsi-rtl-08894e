// wordline_bitcell_tb: exhaustive check of one wordline driver.
//
// All 16 input combinations; expected: read_i = wordline & readen,
// write_i = wordline & ph2 & writeen, and the _b outputs their complements.
module wordline_bitcell_tb;
  logic wordline_i, readen, writeen, ph2;
  logic read_i, read_b_i, write_i, write_b_i;
  int checks = 0, failures = 0;

  wordline_bitcell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {wordline_i, readen, writeen, ph2} = 4'(v);
      #1;
      checks++;
      if (read_i !== (wordline_i & readen) || read_b_i !== ~(wordline_i & readen) ||
          write_i !== (wordline_i & ph2 & writeen) || write_b_i !== ~(wordline_i & ph2 & writeen)) begin
        failures++;
        $display("v=%b: r=%b rb=%b w=%b wb=%b", 4'(v), read_i, read_b_i, write_i, write_b_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
