// Run length of the parallel March C- BIST across memory and block sizes.
// Five copies of the design, of different sizes, run side by side from one
// start pulse. Each must finish fault-free in exactly
// 5*sqrt(k)*(sqrt(k)+sqrt(n)) operation cycles. The sizes include memory
// sizes four times apart at the same block size (the run grows by about 2x,
// not 4x) and block sizes four times apart at the same memory size.
//   (LOG2N, LOG2K) = (10,4) (12,4) (14,4) (12,6) (14,8)
module tb_sram_bist_sizes;
  import sram_bist_pkg::*;

  localparam int NCFG = 5;
  localparam int unsigned CFG_N [NCFG] = '{10, 12, 14, 12, 14};
  localparam int unsigned CFG_K [NCFG] = '{4, 4, 4, 6, 8};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tm = 1'b0, bist_start = 1'b0;
  logic [NCFG-1:0] done, fail, busy;
  int   cycles [NCFG];
  int   expected [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned LN = CFG_N[g];
    localparam int unsigned LK = CFG_K[g];
    logic rdata, eflag;
    march_elem_e el;
    sram_bist_top #(.LOG2N(LN), .LOG2K(LK)) dut (
      .clk, .rst_n, .tm, .bist_start, .addr('0), .we(1'b0), .wdata(1'b0),
      .rdata, .bist_busy(busy[g]), .bist_done(done[g]), .bist_fail(fail[g]),
      .error_flag_n(eflag), .bist_element(el)
    );
    assign expected[g] = 5 * (1 << (LK / 2)) * ((1 << (LK / 2)) + (1 << (LN / 2)));
    always @(posedge clk) if (rst_n && busy[g]) cycles[g] <= cycles[g] + 1;
  end

  initial begin
    for (int g = 0; g < NCFG; g++) cycles[g] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    tm = 1'b1;
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    wait (&done);
    @(negedge clk);
    for (int g = 0; g < NCFG; g++) begin
      checks += 2;
      $display("n=2^%0d k=2^%0d: %0d cycles (formula %0d, plain March C- %0d)",
               CFG_N[g], CFG_K[g], cycles[g], expected[g], 10 * (1 << CFG_N[g]));
      if (cycles[g] != expected[g]) begin failures++; $display("FAIL: cycle count"); end
      if (fail[g]) begin failures++; $display("FAIL: fault reported"); end
    end
    // memory x4 at fixed block size: run length grows by less than 2.1x
    checks += 2;
    if (!(cycles[1] * 100 < cycles[0] * 210 && cycles[2] * 100 < cycles[1] * 210)) begin
      failures++;
      $display("FAIL: growth with memory size");
    end
    if (!(cycles[2] < 10 * (1 << CFG_N[2]) / 4)) begin
      failures++;
      $display("FAIL: not faster than plain March C-");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
