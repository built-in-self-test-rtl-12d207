// SRAM cell array with write drivers and sense amplifiers.
//
// A ROWS x COLS array of single-bit cells (sqrt(n) x sqrt(n)), driven by
// one-hot-or-more word line (wl) and bit line (bl) selects from the mask
// decoders.
//   Write: on the rising clock edge with we=1, every cell whose word line
//          and bit line are both selected takes wdata. With masked decoders
//          this writes the same cell position of many blocks at once.
//   Read:  combinational. The sense amplifiers present the whole row on sa
//          (the row of the lowest selected word line; a read selects exactly
//          one). rdata is the OR of the selected bit lines of that row, the
//          normal one-bit data output.
// No reset: like a real SRAM, the contents are unknown until written.
//
// The document describes the array as a sqrt(n) x sqrt(n) bit array with
// parallel write to all selected cells and parallel read of one word line;
// its circuits are not given, so this is a plain behaviour written as a
// synthesizable register array.
module sram_array #(
  parameter int unsigned ROWS = 2048,
  parameter int unsigned COLS = 2048
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,
  input  logic [COLS-1:0] bl,
  input  logic            we,
  input  logic            wdata,
  output logic [COLS-1:0] sa,
  output logic            rdata
);

  logic [COLS-1:0] mem [ROWS];
  logic [$clog2(ROWS)-1:0] rrow;

  always_ff @(posedge clk) begin
    if (we) begin
      for (int unsigned r = 0; r < ROWS; r++) begin
        if (wl[r]) mem[r] <= (mem[r] & ~bl) | ({COLS{wdata}} & bl);
      end
    end
  end

  always_comb begin
    rrow = '0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      if (wl[r]) rrow = $clog2(ROWS)'(r);
    end
  end

  assign sa    = mem[rrow];
  assign rdata = |(sa & bl);

endmodule
