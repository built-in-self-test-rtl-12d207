// Modified address decoder with a mask address word.
//
// An ordinary decoder selects the one line whose index equals the address.
// Here every address bit whose mask bit is 1 is a "don't care", so the
// decoder selects every line whose index agrees with the address on the
// unmasked bits: with m mask bits set, 2^m lines are selected at once.
// With an all-zero mask it is an ordinary one-hot decoder.
// Used once for the word lines (rows) and once for the bit lines
// (columns). Purely combinational.
//
// The document gives the function (a normal address word and a mask
// address word, parallel writes to all selected locations); the decoder's
// circuit is not given, so this is the plain logic form of that function.
module mask_decoder #(
  parameter int unsigned AW = 11  // address bits: log2(sqrt(n)) = 11 for 4 Mbit
) (
  input  logic [AW-1:0]      addr,
  input  logic [AW-1:0]      mask,
  output logic [(1<<AW)-1:0] sel
);

  always_comb begin
    for (int unsigned i = 0; i < (1 << AW); i++) begin
      sel[i] = ((AW'(i) ^ addr) & ~mask) == '0;
    end
  end

endmodule
