// wordline_bitcell: the enable driver of one memory word.
//
// Read side: a 2-input NAND of the word select and readen gives read_b_i,
// an inverter gives read_i. Write side: a 3-input NAND of the word select,
// ph2 and writeen gives write_b_i, an inverter gives write_i. Gating the
// write with ph2 means a word is written only in the second clock phase,
// when the controller's outputs (updated at the rising edge of ph1) have
// settled. Both rails are produced because the 12T cell needs complementary
// enables. Purely combinational.
module wordline_bitcell (
  input  logic wordline_i,
  input  logic readen,
  input  logic writeen,
  input  logic ph2,
  output logic read_i,
  output logic read_b_i,
  output logic write_i,
  output logic write_b_i
);

  assign read_b_i  = ~(wordline_i & readen);
  assign read_i    = ~read_b_i;
  assign write_b_i = ~(wordline_i & ph2 & writeen);
  assign write_i   = ~write_b_i;

endmodule
