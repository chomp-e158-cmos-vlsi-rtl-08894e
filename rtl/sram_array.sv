// sram_array: the 45-bit board store, ROWS (5) words of COLS (9) bits.
//
// Word k holds board row k, bit j of a word is column j (1 = block still
// on the board). All words share the write bit lines w; each word has its
// own four enables from the wordline logic. The read bit lines of all words
// are one bus: every word drives zeros unless it is read, and the bus is the
// OR of the words, the two-state equivalent of the tristate bus of the
// silicon. Several words may be written at once (the controller uses this
// to fill the whole board with ones after reset).
module sram_array #(
  parameter int ROWS = 5,
  parameter int COLS = 9
) (
  input  logic [ROWS-1:0] read_i,
  input  logic [ROWS-1:0] read_b_i,
  input  logic [ROWS-1:0] write_i,
  input  logic [ROWS-1:0] write_b_i,
  input  logic [COLS-1:0] w,
  output logic [COLS-1:0] r
);

  logic [COLS-1:0] word_r [ROWS];

  for (genvar k = 0; k < ROWS; k++) begin : g_word
    sram_word9 #(.COLS(COLS)) u_word (
      .read_i   (read_i[k]),
      .read_b_i (read_b_i[k]),
      .write_i  (write_i[k]),
      .write_b_i(write_b_i[k]),
      .w        (w),
      .r        (word_r[k])
    );
  end

  always_comb begin
    r = '0;
    for (int k = 0; k < ROWS; k++) r |= word_r[k];
  end

endmodule
