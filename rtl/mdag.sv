// Masked Row Address Generator (MdAG).
//
// A synchronous (HB+1)-bit up/down counter, HB = log2(n/k)/2. Its low HB
// bits are the upper row address bits, the ones that are masked during a
// parallel write but must be stepped one value at a time during reads,
// because only cells on one word line can be read together. The bit above
// them, C, toggles when the field wraps: C differs from its start value once
// every one of the sqrt(n/k) row groups has been read.
//
// Up elements start it with RESET (C=0, field 0) and count up; down
// elements start it with SET (C=1, field all ones) and count down. In both
// cases the reads of one block address are finished when C != I/D.
//
// Inputs, sampled on the rising clock edge, in priority order: reset, set,
// cu (count up), cd (count down). rst_n is an asynchronous power-on reset.
//
// The width, the C bit and the SET/RESET/up/down controls follow the
// document's figure of this counter; the meaning given to C and the
// priority of the controls are this design's choices.
module mdag #(
  parameter int unsigned LOG2N = 22,  // log2 of the memory size in bits
  parameter int unsigned LOG2K = 16,  // log2 of the basic marching block size
  localparam int unsigned HB   = (LOG2N - LOG2K) / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reset,
  input  logic          set,
  input  logic          cu,
  input  logic          cd,
  output logic          c,
  output logic [HB-1:0] addr   // masked row address bits (upper row bits)
);

  logic [HB:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (reset) q <= '0;
    else if (set)   q <= '1;
    else if (cu)    q <= q + 1'b1;
    else if (cd)    q <= q - 1'b1;
  end

  assign {c, addr} = q;

endmodule
