// Edge shift logic of the array processor.
//
// Supplies the shift input of the modules on one edge of the array. For a plain shift
// (SHR) the edge modules receive zeros, unless the master control feeds a column of data
// in (used to fill the array with random numbers); for a shift around (SRA) they receive
// the accumulators of the modules on the opposite edge of the same row or column, so the
// contents rotate. One instance serves each of the four edges. The zero / wrap-around
// behaviour follows the reference design; the fill input is this design's way of letting
// the master control read a column into the array.
//
// Purely combinational; N lines, one per row or column.
module edge_shift_logic #(
  parameter int unsigned N = 32
) (
  input  logic         sra,      // shift-around order active
  input  logic [N-1:0] far_ac,   // accumulators on the opposite edge
  input  logic [N-1:0] fill,     // data entering on a plain shift (zero unless filling)
  output logic [N-1:0] edge_in   // shift input of the edge modules
);

  assign edge_in = sra ? far_ac : fill;

endmodule
