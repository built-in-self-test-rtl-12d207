// Full-size run of the SRAM with parallel March C- BIST at its default
// size: 4 Mbit (2048 x 2048 cells) with 64 Kbit basic marching blocks
// (256 x 256 cells, 64 blocks).
// Normal-mode writes and reads at random addresses are checked against a
// model; then one complete fault-free BIST run must take exactly
// 5*sqrt(k)*(sqrt(k)+sqrt(n)) = 2,949,120 operation cycles, report no
// fault and leave the array all zeros; then a run with one stuck-at-1 cell
// (emulated by rewriting the cell after every clock edge) must report a
// fault.
module tb_sram_bist_full;
  import sram_bist_pkg::*;

  localparam int unsigned LOG2N = 22;
  localparam int unsigned LOG2K = 16;
  localparam int unsigned SIDE  = 1 << (LOG2N / 2);
  localparam int unsigned SQK   = 1 << (LOG2K / 2);
  localparam int unsigned OPS   = 5 * SQK * (SQK + SIDE);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tm = 1'b0, bist_start = 1'b0;
  logic [LOG2N-1:0] addr = '0;
  logic we = 1'b0, wdata = 1'b0;
  logic rdata, bist_busy, bist_done, bist_fail, error_flag_n;
  march_elem_e bist_element;

  int checks = 0, failures = 0;
  logic inject = 1'b0;

  sram_bist_top dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk)
    if (inject) dut.u_array.mem[1234][567] = 1'b1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_bist(output int cycles);
    tm = 1'b1;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    cycles = 0;
    while (!bist_done && cycles < 2 * OPS) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  int cyc;
  logic [LOG2N-1:0] a_list [64];
  logic             d_list [64];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 64; i++) begin
      a_list[i] = LOG2N'($urandom);
      d_list[i] = 1'($urandom);
      // a later write to the same address wins
      for (int j = 0; j < i; j++) if (a_list[j] == a_list[i]) d_list[j] = d_list[i];
      addr = a_list[i]; we = 1'b1; wdata = d_list[i];
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 64; i++) begin
      addr = a_list[i];
      #1 check(rdata == d_list[i], $sformatf("normal read at %0d", a_list[i]));
      @(negedge clk);
    end

    run_bist(cyc);
    check(cyc == OPS, $sformatf("run took %0d cycles, expected %0d", cyc, OPS));
    check(!bist_fail, "fault-free run reports no fault");
    begin
      automatic int ones = 0;
      for (int r = 0; r < SIDE; r++) ones += $countones(dut.u_array.mem[r]);
      check(ones == 0, "array all zeros after March C-");
    end
    $display("full-size run: %0d cycles", cyc);

    inject = 1'b1;
    run_bist(cyc);
    check(bist_fail, "stuck-at-1 cell detected");
    check(cyc == OPS, "run length with a fault");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * OPS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
