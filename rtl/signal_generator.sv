// Fundamental signal generator of the parallel March C- BIST.
//
// Combinational control logic. From the element bits of the block address
// counter (I/D, A, B), the C bit of the masked row address counter and the
// two address fields it decides, for the current clock cycle:
//   - whether the cycle is a read or a write operation (one operation per
//     cycle),
//   - how both counters move at the next clock edge.
//
// Sequence for one block address in an element that reads:
//   sqrt(n/k) reads, one per row group, stepping the masked row address
//   counter, until C != I/D; then (if the element writes) one parallel
//   write, which also steps the block address and restarts the row counter.
// An element that only writes (M1) does one write per block address. The
// read-only element (M6) steps the block address together with its last
// read. At the end of M3 the block counter is SET to all ones, which starts
// M4 at the top address with I/D = 1. So a run takes exactly
// 5*k + 5*sqrt(k)*sqrt(n) operation cycles, the count the document gives.
//
// Interface: run enables the sequence (test mode and started); start
// restarts both counters. Everything is decided within the cycle; the
// counters update on the following clock edge.
//
// The operation counts and the use of the counter bits as control come from
// the document; the exact decoding is this design's, since the document
// only states that this generator is easy to design.
module signal_generator
  import sram_bist_pkg::*;
#(
  parameter int unsigned LOG2N = 22,
  parameter int unsigned LOG2K = 16,
  localparam int unsigned HB   = (LOG2N - LOG2K) / 2
) (
  input  logic             run,
  input  logic             start,
  input  march_elem_e      elem,          // {I/D, A, B}
  input  logic [LOG2K-1:0] blk_addr,      // block address counter field
  input  logic             c,             // row counter carry bit
  input  logic [HB-1:0]    row_addr,      // row counter field
  output logic             op_read,       // read operation this cycle (RM)
  output logic             op_write,      // write operation this cycle
  output logic             bmbag_reset,
  output logic             bmbag_set,
  output logic             bmbag_cu,
  output logic             bmbag_cd,
  output logic             mdag_reset,
  output logic             mdag_set,
  output logic             mdag_cu,
  output logic             mdag_cd,
  output logic             done           // element bits show the end state
);

  logic id;
  logic reads_done;
  logic row_last;
  logic advance;
  logic next_id;

  always_comb begin
    id         = elem[2];
    done       = (elem == EL_DONE);
    reads_done = c ^ id;
    row_last   = id ? (row_addr == '0) : (row_addr == '1);

    op_read  = run && !done && elem_has_read(elem) && !reads_done;
    op_write = run && !done && elem_has_write(elem) &&
               (reads_done || !elem_has_read(elem));

    // Step the block address after the write, or after the last read of M6.
    advance = op_write || (op_read && elem == EL_M6 && row_last);

    bmbag_reset = start;
    bmbag_set   = !start && advance && elem == EL_M3 && blk_addr == '1;
    bmbag_cu    = !start && advance && !id;
    bmbag_cd    = !start && advance && id;

    // Direction of the element that the next block address belongs to.
    next_id    = id || bmbag_set;
    mdag_reset = start || (advance && !next_id);
    mdag_set   = !start && advance && next_id;
    mdag_cu    = op_read && !id;
    mdag_cd    = op_read && id;
  end

endmodule
