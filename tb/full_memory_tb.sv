// full_memory_tb: self-checking test of the complete 45-bit memory.
//
// Runs the two-phase clock. First every word gets a different pattern and
// all are read back (each word is addressed uniquely). Then each cycle applies a random access with the
// controller's timing (inputs change just after ph1 rises): an all-ones
// fill, a one-hot write, or a one-hot read. Writes must land only through
// the ph2 pulse: a write request that is withdrawn before ph2 rises must not
// change the memory. Reads are compared with a reference array.
module full_memory_tb;
  localparam int ROWS = 5, COLS = 9;
  logic ph1 = 0, ph2 = 0;
  logic readen, writeen;
  logic [ROWS-1:0] wordline;
  logic [COLS-1:0] writeline, readline;
  logic [COLS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  full_memory #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  initial forever begin
    #3 ph1 = 1; #4 ph1 = 0; #3 ph2 = 1; #4 ph2 = 0;
  end

  initial begin
    repeat (5000) @(posedge ph1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    readen = 0; writeen = 0; wordline = '0; writeline = '0;
    // fill with ones
    @(posedge ph1); #1;
    writeen = 1; wordline = '1; writeline = '1;
    @(posedge ph1); #1;
    writeen = 0; wordline = '0;
    for (int k = 0; k < ROWS; k++) ref_mem[k] = '1;
    // unique addressing: a different pattern in every word, then read all
    for (int k = 0; k < ROWS; k++) begin
      writeen = 1; wordline = ROWS'(1) << k; writeline = COLS'(k * 73 + 5);
      ref_mem[k] = writeline;
      @(posedge ph1); #1;
    end
    writeen = 0;
    for (int k = 0; k < ROWS; k++) begin
      readen = 1; wordline = ROWS'(1) << k; #1;
      checks++;
      if (readline !== ref_mem[k]) begin
        failures++;
        $display("addressing: word %0d reads %b exp %b", k, readline, ref_mem[k]);
      end
      @(posedge ph1); #1;
    end
    readen = 0; wordline = '0;
    for (int i = 0; i < 600; i++) begin
      int k, op;
      k  = $urandom_range(ROWS - 1);
      op = $urandom_range(3);
      if (op == 0) begin
        // write through the ph2 pulse
        writeen = 1; readen = 0; wordline = ROWS'(1) << k; writeline = COLS'($urandom);
        ref_mem[k] = writeline;
        @(posedge ph1); #1;
      end else if (op == 1) begin
        // write request withdrawn during ph1: no ph2 pulse seen, no write
        writeen = 1; readen = 0; wordline = ROWS'(1) << k; writeline = COLS'($urandom);
        #2;
        writeen = 0;
        @(posedge ph1); #1;
      end else begin
        writeen = 0; readen = 1; wordline = ROWS'(1) << k; writeline = COLS'($urandom);
        #1;
        checks++;
        if (readline !== ref_mem[k]) begin
          failures++;
          $display("read word %0d: %b exp %b", k, readline, ref_mem[k]);
        end
        @(posedge ph1); #1;
      end
      writeen = 0; readen = 0; wordline = '0;
      #1;
      checks++;
      if (readline !== '0) begin failures++; $display("idle read bus %b", readline); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
