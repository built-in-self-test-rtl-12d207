// Test of the cell array (16 x 16): random parallel writes with several
// word lines and bit lines selected, checked against a model array; reads
// with one word line must present that row on the sense amplifier outputs
// and the OR of the selected bit lines on rdata.
module tb_sram_array;
  localparam int unsigned ROWS = 16, COLS = 16;
  logic clk = 1'b0;
  logic [ROWS-1:0] wl;
  logic [COLS-1:0] bl;
  logic we, wdata;
  logic [COLS-1:0] sa;
  logic rdata;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  sram_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = 1'b0; wl = '0; bl = '0; wdata = 1'b0;
    // initialise every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wl = ROWS'(1) << r; bl = '1; we = 1'b1; wdata = 1'($urandom);
      model[r] = {COLS{wdata}};
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (t % 2 == 0) begin
        wl = ROWS'($urandom) & ROWS'($urandom); bl = COLS'($urandom) & COLS'($urandom);
        we = 1'b1; wdata = 1'($urandom);
        for (int r = 0; r < ROWS; r++)
          if (wl[r]) model[r] = (model[r] & ~bl) | ({COLS{wdata}} & bl);
      end else begin
        automatic int unsigned r = $urandom_range(ROWS - 1);
        we = 1'b0;
        wl = ROWS'(1) << r;
        bl = (t % 4 == 1) ? COLS'(1) << $urandom_range(COLS - 1) : COLS'($urandom);
        #1;
        checks += 2;
        if (sa !== model[r]) begin failures++; $display("FAIL: row %0d reads %h, expected %h", r, sa, model[r]); end
        if (rdata !== |(model[r] & bl)) begin failures++; $display("FAIL: rdata row %0d", r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
