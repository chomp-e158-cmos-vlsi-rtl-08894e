// full_memory: the complete 45-bit board memory, wordline logic plus array.
//
// Interface: a one-hot word select (wordline), a read enable, a write
// enable, 9-bit write data and 9-bit read data. Reading is combinational:
// readline shows the selected word while readen is high and is zero
// otherwise. Writing is level sensitive: the selected word(s) follow
// writeline while writeen and ph2 are both high, and keep the last value
// when ph2 falls. The controller changes its outputs at the rising edge of
// ph1, so the write data are stable during the whole ph2 pulse.
module full_memory #(
  parameter int ROWS = 5,
  parameter int COLS = 9
) (
  input  logic            ph2,
  input  logic            readen,
  input  logic            writeen,
  input  logic [ROWS-1:0] wordline,
  input  logic [COLS-1:0] writeline,
  output logic [COLS-1:0] readline
);

  logic [ROWS-1:0] rd, rd_b, wr, wr_b;

  wordline_logic #(.ROWS(ROWS)) u_wordline (
    .readen  (readen),
    .writeen (writeen),
    .ph2     (ph2),
    .wordline(wordline),
    .read    (rd),
    .read_b  (rd_b),
    .write   (wr),
    .write_b (wr_b)
  );

  sram_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .read_i   (rd),
    .read_b_i (rd_b),
    .write_i  (wr),
    .write_b_i(wr_b),
    .w        (writeline),
    .r        (readline)
  );

endmodule
