// Test of the BIST controller alone (LOG2N = 10, LOG2K = 4: 32 x 32 cells,
// 4 x 4-cell blocks, three block-select bits per address).
// With tm low it must stay idle: no write, no comparator enable, masks 0.
// During a run every write must mask the three upper row and column bits
// and carry the March C- data value; every read must leave the row
// unmasked, mask the upper column bits and step the upper row bits
// through all eight row groups; the low address bits must walk the block
// position. The run must take 5*sqrt(k)*(sqrt(k)+sqrt(n)) = 720 operation
// cycles. A low comparator flag during a read must set fail, one during a
// write (comparator disabled) must not, and a new start must clear fail.
module tb_bist_controller;
  import sram_bist_pkg::*;
  localparam int unsigned LOG2N = 10, LOG2K = 4;
  localparam int unsigned RA = LOG2N / 2, LB = LOG2K / 2, HB = (LOG2N - LOG2K) / 2;
  localparam int unsigned OPS = 5 * (1 << LB) * ((1 << LB) + (1 << RA));

  logic clk = 1'b0, rst_n = 1'b0;
  logic tm = 1'b0, start = 1'b0, error_flag_n = 1'b1;
  logic [RA-1:0] row_addr, col_addr, mask_row, mask_col;
  logic we, wdata, cmp_en;
  march_elem_e elem;
  logic busy, done, fail;
  int checks = 0, failures = 0;

  bist_controller #(.LOG2N(LOG2N), .LOG2K(LOG2K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [RA-1:0] HIMASK = {{HB{1'b1}}, {LB{1'b0}}};

  // per-cycle rule checks while running
  int n_ops, n_wr, n_rd;
  logic [HB-1:0] grp_seen;
  always @(negedge clk) begin
    if (tm && busy) begin
      if (we) begin
        n_wr++;
        check(mask_row == HIMASK && mask_col == HIMASK, "write masks upper row and column bits");
        check(wdata == (elem inside {EL_M2, EL_M4}), "write data follows March C-");
        check(!cmp_en, "no comparison in a write");
      end
      if (cmp_en) begin
        n_rd++;
        check(mask_row == '0 && mask_col == HIMASK, "read masks only the upper column bits");
        check(col_addr[RA-1:LB] == '0, "column block bits zero");
      end
      if (we || cmp_en) n_ops++;
    end
  end

  int cyc;
  logic [7:0] groups;

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;  // ignored without tm
    @(negedge clk);
    start = 1'b0;
    repeat (5) begin
      check(!we && !cmp_en && mask_row == '0 && mask_col == '0 && !busy, "idle outside test mode");
      @(negedge clk);
    end

    // fault-free run, also collecting the row groups of the first reads
    tm = 1'b1; start = 1'b1;
    n_ops = 0; n_wr = 0; n_rd = 0;
    @(negedge clk);
    start = 1'b0;
    cyc = 0; groups = '0;
    while (!done && cyc < 3 * OPS) begin
      if (cmp_en && elem == EL_M2 && row_addr[LB-1:0] == '0 && col_addr[LB-1:0] == '0)
        groups[row_addr[RA-1:LB]] = 1'b1;
      @(negedge clk);
      cyc++;
    end
    check(cyc == OPS, $sformatf("run took %0d cycles, expected %0d", cyc, OPS));
    check(n_ops == OPS, "one operation per cycle");
    check(n_wr == 5 * (1 << LOG2K), $sformatf("%0d writes", n_wr));
    check(groups == 8'hFF, "reads visit all eight row groups");
    check(!fail && elem == EL_DONE, "no fault, end state");

    // fault flag during a write is ignored, during a read it is caught
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(!fail, "start clears fail");
    while (!we) @(negedge clk);
    error_flag_n = 1'b0;
    @(negedge clk);
    error_flag_n = 1'b1;
    check(!fail, "flag ignored during a write");
    while (!cmp_en) @(negedge clk);
    error_flag_n = 1'b0;
    @(negedge clk);
    error_flag_n = 1'b1;
    check(fail, "flag caught during a read");
    while (!done) @(negedge clk);
    check(fail, "fail stays set");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * OPS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
