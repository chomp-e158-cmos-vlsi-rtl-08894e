// sram_cell_tb: self-checking test of one 12T storage cell.
//
// Applies random combinations of write data and of the two complementary
// enable pairs and compares the read bit line with a reference: the cell
// takes w only while write=1 and writeb=0, keeps its value otherwise, and
// drives r only while read=1 and readb=0.
module sram_cell_tb;
  logic w, write, writeb, read, readb, r;
  int   checks = 0, failures = 0;
  logic ref_q;
  logic ref_known;

  sram_cell dut (.w(w), .write(write), .writeb(writeb), .read(read), .readb(readb), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_known = 1'b0;
    ref_q     = 1'b0;
    // first write a known value
    w = 1'b1; write = 1'b1; writeb = 1'b0; read = 1'b0; readb = 1'b1; #1;
    ref_q = 1'b1; ref_known = 1'b1;
    write = 1'b0; writeb = 1'b1; #1;
    for (int i = 0; i < 400; i++) begin
      logic [4:0] v;
      v = 5'($urandom);
      w = v[0]; write = v[1]; writeb = v[2]; read = v[3]; readb = v[4];
      #1;
      if (write && !writeb) ref_q = w;
      checks++;
      if (r !== ((read && !readb) ? ref_q : 1'b0)) begin
        failures++;
        $display("mismatch: w=%b wr=%b wrb=%b rd=%b rdb=%b r=%b exp_q=%b", w, write, writeb, read, readb, r, ref_q);
      end
      // close the write window before the next random step
      write = 1'b0; writeb = 1'b1; #1;
      read = 1'b1; readb = 1'b0; #1;
      checks++;
      if (r !== ref_q) begin
        failures++;
        $display("hold/read mismatch: r=%b exp=%b", r, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
