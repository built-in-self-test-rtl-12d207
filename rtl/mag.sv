// Mask Address Generator (MAG).
//
// Produces the two mask address words for the modified row and column
// decoders. Each is HB = log2(n/k)/2 bits wide and covers the upper bits of
// its address, the bits that tell the basic marching blocks apart.
//   mask_col: all ones whenever test mode (tm) is on, all zeros otherwise:
//             a test access always reaches the same column of every block.
//   mask_row: all ones in test mode except during read operations (rm):
//             a write reaches every block row at once, a read only one
//             word line.
// Purely combinational.
//
// Both selections follow the document's description and figure of this
// generator (an all-0s / all-1s choice per word); the gate used to combine
// tm and rm is not printed there, so this design uses tm & ~rm.
module mag #(
  parameter int unsigned HB = 3  // log2(n/k)/2; 3 for 4 Mbit / 64 Kbit
) (
  input  logic          tm,        // test mode
  input  logic          rm,        // read operation in test mode
  output logic [HB-1:0] mask_col,
  output logic [HB-1:0] mask_row
);

  always_comb begin
    mask_col = tm ? '1 : '0;
    mask_row = (tm && !rm) ? '1 : '0;
  end

endmodule
