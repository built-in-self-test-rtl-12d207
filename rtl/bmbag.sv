// Basic March Block Address Generator (BMBAG).
//
// A synchronous (LOG2K+3)-bit up/down counter. Its low LOG2K bits are the
// address of a cell inside the basic marching block (sqrt(k) x sqrt(k)
// cells); this address is applied to every block at once. The three bits
// above it, I/D, A and B, are driven by the carry or borrow out of the
// address field, so they count the march elements (see sram_bist_pkg).
//
// Inputs, all sampled on the rising clock edge, in priority order:
//   reset  load all zeros (start of M1)
//   set    load all ones  (start of M4: I/D=1, address at its top)
//   cu     count up
//   cd     count down
// rst_n is an asynchronous power-on reset to all zeros.
//
// The counter width, the field names and the SET/RESET and count-up/
// count-down controls follow the document's figure of this counter. The
// order of the fields, the priority of the controls and the power-on reset
// are this design's choices.
module bmbag #(
  parameter int unsigned LOG2K = 16  // log2 of the cells in a basic marching block
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reset,
  input  logic             set,
  input  logic             cu,
  input  logic             cd,
  output logic             id,    // I/D: 1 while addresses decrease
  output logic             a,
  output logic             b,
  output logic [LOG2K-1:0] addr   // basic march block address
);

  logic [LOG2K+2:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (reset) q <= '0;
    else if (set)   q <= '1;
    else if (cu)    q <= q + 1'b1;
    else if (cd)    q <= q - 1'b1;
  end

  assign {id, a, b, addr} = q;

endmodule
