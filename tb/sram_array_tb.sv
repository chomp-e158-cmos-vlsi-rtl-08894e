// sram_array_tb: self-checking test of the 5x9 cell array.
//
// Fills all words at once with ones (several write enables high together),
// then performs random single-word writes and reads against a reference
// array. A word that is not written must keep its value; reading with no
// word enabled gives zeros.
module sram_array_tb;
  localparam int ROWS = 5, COLS = 9;
  logic [ROWS-1:0] read_i, read_b_i, write_i, write_b_i;
  logic [COLS-1:0] w, r;
  logic [COLS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  sram_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  task automatic set_en(input logic [ROWS-1:0] rd, input logic [ROWS-1:0] wr);
    read_i = rd; read_b_i = ~rd; write_i = wr; write_b_i = ~wr;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_en('0, '0); w = '0; #1;
    w = '1; set_en('0, '1); #1; set_en('0, '0); #1;
    for (int k = 0; k < ROWS; k++) ref_mem[k] = '1;
    for (int k = 0; k < ROWS; k++) begin
      set_en(ROWS'(1) << k, '0); #1;
      checks++;
      if (r !== '1) begin failures++; $display("fill word %0d r=%b", k, r); end
    end
    set_en('0, '0); #1;
    checks++;
    if (r !== '0) begin failures++; $display("idle bus r=%b", r); end
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(ROWS - 1);
      if ($urandom_range(1)) begin
        w = COLS'($urandom);
        set_en('0, ROWS'(1) << k); #1;
        ref_mem[k] = w;
        set_en('0, '0); #1;
        w = COLS'($urandom); #1;
      end else begin
        set_en(ROWS'(1) << k, '0); #1;
        checks++;
        if (r !== ref_mem[k]) begin
          failures++;
          $display("read word %0d r=%b exp=%b", k, r, ref_mem[k]);
        end
        set_en('0, '0); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
