// Shared types of the parallel March C- SRAM BIST.
//
// The three top bits of the basic march block address counter (I/D, A, B)
// name the march element being run. The counter counts up through the
// first three elements and is then SET to all ones and counts down through
// the last three, so I/D is 1 exactly while the addresses decrease:
//
//   {I/D,A,B}  element  operations      (March C-)
//   000        M1       up   (w0)
//   001        M2       up   (r0,w1)
//   010        M3       up   (r1,w0)
//   111        M4       down (r0,w1)
//   110        M5       down (r1,w0)
//   101        M6       down (r0)
//   100        done
//
// The March C- elements are the document's; this encoding of them in the
// counter's top bits is this design's reading of the counter layout.
package sram_bist_pkg;

  typedef enum logic [2:0] {
    EL_M1     = 3'b000,
    EL_M2     = 3'b001,
    EL_M3     = 3'b010,
    EL_UNUSED = 3'b011,  // never held: replaced by a SET of the counter
    EL_M4     = 3'b111,
    EL_M5     = 3'b110,
    EL_M6     = 3'b101,
    EL_DONE   = 3'b100
  } march_elem_e;

  // Element has a read operation (M2..M6).
  function automatic logic elem_has_read(march_elem_e e);
    return e inside {EL_M2, EL_M3, EL_M4, EL_M5, EL_M6};
  endfunction

  // Element has a write operation (M1..M5).
  function automatic logic elem_has_write(march_elem_e e);
    return e inside {EL_M1, EL_M2, EL_M3, EL_M4, EL_M5};
  endfunction

  // Value an element writes: w0 in M1, M3, M5 and w1 in M2, M4.
  function automatic logic elem_write_value(march_elem_e e);
    return e inside {EL_M2, EL_M4};
  endfunction

endpackage
