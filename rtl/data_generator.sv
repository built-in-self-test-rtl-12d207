// Data generator of the parallel March C- BIST.
//
// Gives the value written by the current march element: 0 in M1, M3 and
// M5, 1 in M2 and M4 (March C-: up(w0); up(r0,w1); up(r1,w0);
// down(r0,w1); down(r1,w0); down(r0)). No expected read value is needed:
// the parallel comparator works without a reference.
// Purely combinational; the element comes from the top bits of the block
// address counter (see sram_bist_pkg).
//
// The document names this generator and gives March C-; how it is built is
// this design's choice.
module data_generator
  import sram_bist_pkg::*;
(
  input  march_elem_e elem,
  output logic        wdata    // value written by this element
);

  always_comb wdata = elem_write_value(elem);

endmodule
