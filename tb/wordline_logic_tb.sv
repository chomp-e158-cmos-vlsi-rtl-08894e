// wordline_logic_tb: self-checking test of the 5-word wordline driver.
//
// Random word selects (one-hot, all ones, arbitrary) with random enables
// and clock phase; each word's four outputs are compared with the gate
// equations read = sel & readen, write = sel & ph2 & writeen.
module wordline_logic_tb;
  localparam int ROWS = 5;
  logic readen, writeen, ph2;
  logic [ROWS-1:0] wordline, read, read_b, write, write_b;
  int checks = 0, failures = 0;

  wordline_logic #(.ROWS(ROWS)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      readen = 1'($urandom); writeen = 1'($urandom); ph2 = 1'($urandom);
      case ($urandom_range(2))
        0: wordline = ROWS'(1) << $urandom_range(ROWS - 1);
        1: wordline = '1;
        default: wordline = ROWS'($urandom);
      endcase
      #1;
      checks++;
      if (read !== (wordline & {ROWS{readen}}) || read_b !== ~read ||
          write !== (wordline & {ROWS{ph2 & writeen}}) || write_b !== ~write) begin
        failures++;
        $display("sel=%b re=%b we=%b ph2=%b: r=%b w=%b", wordline, readen, writeen, ph2, read, write);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
