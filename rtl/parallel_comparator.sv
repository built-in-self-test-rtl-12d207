// Parallel comparator on the sense amplifier outputs.
//
// During a test-mode read it looks at the sense amplifier outputs of the
// selected bit lines and checks that they all hold the same value, without
// any expected value: the cells at the same position of every basic
// marching block were written together, so any disagreement is a fault.
//   error_flag_n = 0  the selected outputs differ (fault seen)
//   error_flag_n = 1  they agree, or the comparator is idle
// While en is low (writes, and all of normal mode) the comparator is
// isolated from the sense amplifiers and the flag stays precharged at 1.
// Combinational: the flag is valid in the cycle of the read.
//
// The document gives this circuit at transistor level: a precharged error
// flag line pulled low through the bit-line stages, with two shared lines
// labelled WD and RD. This design models its logic function only: one term
// that sees a selected 1, one that sees a selected 0, and a fault when
// both are present.
module parallel_comparator #(
  parameter int unsigned W = 2048  // bit lines: sqrt(n) = 2048 for 4 Mbit
) (
  input  logic         en,           // test-mode read (W/R high, TM)
  input  logic [W-1:0] sa,           // sense amplifier outputs
  input  logic [W-1:0] sel,          // selected bit lines
  output logic         error_flag_n
);

  logic seen_one;
  logic seen_zero;

  always_comb begin
    seen_one     = |(sa & sel);
    seen_zero    = |(~sa & sel);
    error_flag_n = !(en && seen_one && seen_zero);
  end

endmodule
