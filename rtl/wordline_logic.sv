// wordline_logic: enable drivers for all ROWS (5) memory words.
//
// One wordline_bitcell per word, all sharing readen, writeen and ph2; word
// k is selected by wordline[k]. The select is one-hot for normal accesses,
// all ones when the whole memory is initialised. Combinational.
module wordline_logic #(
  parameter int ROWS = 5
) (
  input  logic            readen,
  input  logic            writeen,
  input  logic            ph2,
  input  logic [ROWS-1:0] wordline,
  output logic [ROWS-1:0] read,
  output logic [ROWS-1:0] read_b,
  output logic [ROWS-1:0] write,
  output logic [ROWS-1:0] write_b
);

  for (genvar k = 0; k < ROWS; k++) begin : g_bit
    wordline_bitcell u_bit (
      .wordline_i(wordline[k]),
      .readen    (readen),
      .writeen   (writeen),
      .ph2       (ph2),
      .read_i    (read[k]),
      .read_b_i  (read_b[k]),
      .write_i   (write[k]),
      .write_b_i (write_b[k])
    );
  end

endmodule
