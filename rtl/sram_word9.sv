// sram_word9: one word of the board memory, COLS (9) 12T cells side by side.
//
// All cells of the word share the four word enables (read, readb, write,
// writeb) produced by the wordline logic; cell i sits on write bit line w[i]
// and read bit line r[i]. When the word is not read, r is all zeros.
// Purely structural; timing is that of sram_cell.
module sram_word9 #(
  parameter int COLS = 9
) (
  input  logic            read_i,
  input  logic            read_b_i,
  input  logic            write_i,
  input  logic            write_b_i,
  input  logic [COLS-1:0] w,
  output logic [COLS-1:0] r
);

  for (genvar i = 0; i < COLS; i++) begin : g_cell
    sram_cell u_cell (
      .w     (w[i]),
      .write (write_i),
      .writeb(write_b_i),
      .read  (read_i),
      .readb (read_b_i),
      .r     (r[i])
    );
  end

endmodule
