// sram_cell: one 12-transistor static storage cell of the board memory.
//
// The cell stores one bit on a cross-coupled inverter pair. A transmission
// gate, controlled by the complementary pair write/writeb, drives the write
// bit line w onto the storage node while write is high and writeb is low;
// the keeper is switched off at the same time, so the cell is transparent
// while it is written and holds its value otherwise. A tristate inverter,
// controlled by read/readb, drives the stored bit onto the read bit line r.
//
// Modelled here as a level-sensitive latch (the cell is one). The shared
// read bit line is a tristate bus in silicon; in this two-state model a cell
// that is not read drives 0 and the word and array OR the lines together,
// which gives the same value as long as at most one word is read at a time.
// Timing: w must be stable while write is high (the wordline logic only
// raises write during ph2).
module sram_cell (
  input  logic w,       // write bit line
  input  logic write,   // write enable, true rail
  input  logic writeb,  // write enable, complement rail
  input  logic read,    // read enable, true rail
  input  logic readb,   // read enable, complement rail
  output logic r        // read bit line contribution
);

  logic q;

  always_latch begin
    if (write && !writeb) q = w;
  end

  assign r = (read && !readb) ? q : 1'b0;

endmodule
