// End-to-end test of the SRAM with parallel March C- BIST, at a reduced
// size (1 Kbit memory of 32 x 32 cells, 16-bit basic marching blocks of
// 4 x 4 cells, so 64 blocks).
//
// 1. Normal mode: random writes and reads through the one-bit port,
//    checked against a model memory in the testbench.
// 2. Fault-free BIST run: the cycle count must be 5*k + 5*sqrt(k)*sqrt(n);
//    every element must issue the right number of reads and writes in the
//    right address order; a write must select n/k cells, a read one word
//    line and sqrt(n/k) bit lines; fail must stay 0; the array must end
//    all zeros (last write is w0).
// 3. Faulty runs, with a fault emulated by rewriting one cell after every
//    clock edge: stuck-at-1, stuck-at-0 and an up-transition fault must set
//    bist_fail, and so must an inversion coupling fault between two cells
//    at different block positions. Two faults the scheme cannot see must
//    not set it: an idempotent coupling fault between cells at the same
//    position of two blocks, and the same stuck-at-1 placed at one position
//    of every block.
// Each mechanism (parallel write, single-line read, row-counter wrap,
// direction switch, comparator flag, normal access) is counted; one that
// never happened counts as a failure.
module tb_sram_bist_top;
  import sram_bist_pkg::*;

  localparam int unsigned LOG2N = 10;
  localparam int unsigned LOG2K = 4;
  localparam int unsigned RA    = LOG2N / 2;
  localparam int unsigned LB    = LOG2K / 2;
  localparam int unsigned SIDE  = 1 << RA;
  localparam int unsigned K     = 1 << LOG2K;
  localparam int unsigned SQK   = 1 << LB;
  localparam int unsigned NBLK  = 1 << (LOG2N - LOG2K);
  localparam int unsigned SQNK  = 1 << ((LOG2N - LOG2K) / 2);
  localparam int unsigned OPS   = 5 * SQK * (SQK + SIDE);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tm = 1'b0, bist_start = 1'b0;
  logic [LOG2N-1:0] addr = '0;
  logic we = 1'b0, wdata = 1'b0;
  logic rdata, bist_busy, bist_done, bist_fail, error_flag_n;
  march_elem_e bist_element;

  int checks = 0, failures = 0;
  int n_par_write = 0, n_line_read = 0, n_row_wrap = 0, n_dir_switch = 0;
  int n_flag = 0, n_normal = 0, n_undetected_alias = 0;

  sram_bist_top #(.LOG2N(LOG2N), .LOG2K(LOG2K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- fault emulation: rewrite cells after every rising edge ----------
  typedef enum int {F_NONE, F_SA1, F_SA0, F_TF_UP, F_CF_INV, F_CFID_SAME, F_SA1_ALL} fault_e;
  fault_e fault = F_NONE;
  int unsigned frow = 9, fcol = 22;
  int unsigned vrow = 18, vcol = 7;
  logic tf_prev = 1'b0;

  always @(negedge clk) begin
    case (fault)
      F_SA1:   dut.u_array.mem[frow][fcol] = 1'b1;
      F_SA0:   dut.u_array.mem[frow][fcol] = 1'b0;
      F_TF_UP: begin
        // cell cannot rise from 0 to 1
        if (!tf_prev && dut.u_array.mem[frow][fcol]) dut.u_array.mem[frow][fcol] = 1'b0;
        tf_prev = dut.u_array.mem[frow][fcol];
      end
      F_CF_INV: begin
        // inversion coupling: a rising aggressor inverts the victim cell
        if (!tf_prev && dut.u_array.mem[frow][fcol])
          dut.u_array.mem[vrow][vcol] = !dut.u_array.mem[vrow][vcol];
        tf_prev = dut.u_array.mem[frow][fcol];
      end
      F_CFID_SAME: begin
        // idempotent coupling: a rising aggressor forces the victim to 1
        if (!tf_prev && dut.u_array.mem[frow][fcol]) dut.u_array.mem[vrow][vcol] = 1'b1;
        tf_prev = dut.u_array.mem[frow][fcol];
      end
      F_SA1_ALL:
        for (int br = 0; br < SQNK; br++)
          for (int bc = 0; bc < SQNK; bc++)
            dut.u_array.mem[br*SQK + (frow % SQK)][bc*SQK + (fcol % SQK)] = 1'b1;
      default: ;
    endcase
  end

  // ---- monitor of the BIST operations -----------------------------------
  int rd_cnt [8];
  int wr_cnt [8];
  int unsigned exp_pos [8];
  int rd_in_group;
  march_elem_e prev_elem;
  logic prev_c;

  always @(posedge clk) begin
    if (tm && bist_busy) begin
      automatic int e = int'(bist_element);
      automatic int unsigned pos = int'({dut.row_a[LB-1:0], dut.col_a[LB-1:0]});
      automatic logic down = bist_element[2];
      if (dut.u_bist.we) begin
        wr_cnt[e]++;
        if ($countones(dut.wl) * $countones(dut.bl) == NBLK) n_par_write++;
        else begin failures++; $display("FAIL: write selects %0d cells", $countones(dut.wl) * $countones(dut.bl)); end
        if (pos != exp_pos[e]) begin
          failures++;
          $display("FAIL: element %s wrote position %0d, expected %0d", bist_element.name(), pos, exp_pos[e]);
        end
        exp_pos[e] = down ? exp_pos[e] - 1 : exp_pos[e] + 1;
        if (bist_element != EL_M1 && rd_in_group != SQNK) begin
          failures++;
          $display("FAIL: %0d reads before a write, expected %0d", rd_in_group, SQNK);
        end
        rd_in_group = 0;
      end
      if (dut.u_bist.cmp_en) begin
        rd_cnt[e]++;
        rd_in_group++;
        if ($countones(dut.wl) == 1 && $countones(dut.bl) == SQNK) n_line_read++;
        else begin failures++; $display("FAIL: read selects %0d lines x %0d bits", $countones(dut.wl), $countones(dut.bl)); end
        if (bist_element == EL_M6) begin
          if (rd_in_group == SQNK) begin
            if (pos != exp_pos[e]) begin
              failures++;
              $display("FAIL: M6 read position %0d, expected %0d", pos, exp_pos[e]);
            end
            exp_pos[e] = exp_pos[e] - 1;
            rd_in_group = 0;
          end
        end
        if (!error_flag_n) n_flag++;
      end
      if (dut.u_bist.c != prev_c) n_row_wrap++;
      if (prev_elem == EL_M3 && bist_element == EL_M4) n_dir_switch++;
    end
    prev_elem <= bist_element;
    prev_c    <= dut.u_bist.c;
  end

  task automatic run_bist(output int cycles);
    for (int e = 0; e < 8; e++) begin
      rd_cnt[e] = 0;
      wr_cnt[e] = 0;
      exp_pos[e] = e[2] ? int'(K - 1) : 0;
    end
    rd_in_group = 0;
    tm = 1'b1;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    cycles = 1;
    while (!bist_done && cycles < 10 * OPS) begin
      @(negedge clk);
      cycles++;
    end
    // cycles now counts the OPS operation cycles plus the one cycle in
    // which the controller leaves the busy state
  endtask

  int cyc;
  logic model [SIDE*SIDE];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1. normal mode -------------------------------------------------
    for (int i = 0; i < SIDE * SIDE; i++) begin
      addr = LOG2N'(i); we = 1'b1; wdata = 1'($urandom);
      model[i] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 200; i++) begin
      automatic int unsigned a = $urandom_range(SIDE * SIDE - 1);
      addr = LOG2N'(a);
      #1;
      check(rdata == model[a], $sformatf("normal read at %0d", a));
      check(error_flag_n == 1'b1, "comparator isolated in normal mode");
      n_normal++;
      @(negedge clk);
    end

    // ---- 2. fault-free BIST -----------------------------------------------
    run_bist(cyc);
    check(cyc == OPS + 1, $sformatf("fault-free run took %0d cycles, expected %0d", cyc, OPS + 1));
    check(rd_cnt.sum() + wr_cnt.sum() == OPS, "one operation per cycle, 5*sqrt(k)*(sqrt(k)+sqrt(n)) in all");
    check(!bist_fail, "fault-free run reports no fault");
    check(wr_cnt[EL_M1] == K, $sformatf("M1 writes %0d", wr_cnt[EL_M1]));
    check(rd_cnt[EL_M1] == 0, "M1 reads nothing");
    foreach (wr_cnt[e]) begin
      if (march_elem_e'(e[2:0]) inside {EL_M2, EL_M3, EL_M4, EL_M5}) begin
        check(wr_cnt[e] == K, $sformatf("element %0d writes %0d", e, wr_cnt[e]));
        check(rd_cnt[e] == SQK * SIDE, $sformatf("element %0d reads %0d", e, rd_cnt[e]));
      end
    end
    check(wr_cnt[EL_M6] == 0, "M6 writes nothing");
    check(rd_cnt[EL_M6] == SQK * SIDE, $sformatf("M6 reads %0d", rd_cnt[EL_M6]));
    check(bist_element == EL_DONE && !bist_busy, "BIST idle in the end state");
    begin
      automatic int ones = 0;
      for (int r = 0; r < SIDE; r++) ones += $countones(dut.u_array.mem[r]);
      check(ones == 0, "array all zeros after March C-");
    end

    // ---- 3. faulty runs ----------------------------------------------------
    fault = F_SA1;
    run_bist(cyc);
    check(bist_fail, "stuck-at-1 detected");
    check(cyc == OPS + 1, "run length with a fault");
    fault = F_SA0;
    run_bist(cyc);
    check(bist_fail, "stuck-at-0 detected");
    frow = 30; fcol = 1;
    fault = F_TF_UP; tf_prev = 1'b0;
    run_bist(cyc);
    check(bist_fail, "up-transition fault detected");
    fault = F_CF_INV; tf_prev = 1'b0;
    run_bist(cyc);
    check(bist_fail, "inversion coupling fault detected");
    // aggressor and victim at the same position of two blocks are always
    // written together, so a coupling that forces the value being written
    // is never seen
    frow = 9; fcol = 22; vrow = 17; vcol = 6;
    fault = F_CFID_SAME; tf_prev = 1'b0;
    run_bist(cyc);
    check(!bist_fail, "idempotent coupling between same-position cells is not seen");
    if (!bist_fail) n_undetected_alias++;
    fault = F_SA1_ALL;
    run_bist(cyc);
    check(!bist_fail, "same fault in every block is not seen by the comparator");
    if (!bist_fail) n_undetected_alias++;
    fault = F_NONE;
    run_bist(cyc);
    check(!bist_fail, "fail flag cleared by a new start");

    // back to normal mode
    tm = 1'b0;
    addr = LOG2N'(5); we = 1'b1; wdata = 1'b1;
    @(negedge clk);
    we = 1'b0;
    #1 check(rdata == 1'b1, "normal access after test");

    // ---- mechanisms --------------------------------------------------------
    $display("mechanisms: parallel_write=%0d line_read=%0d row_counter_wrap=%0d direction_switch=%0d fault_flag=%0d normal_access=%0d undetected_alias=%0d",
             n_par_write, n_line_read, n_row_wrap, n_dir_switch, n_flag, n_normal, n_undetected_alias);
    check(n_par_write > 0, "parallel write happened");
    check(n_line_read > 0, "single word line read happened");
    check(n_row_wrap > 0, "row counter wrap happened");
    check(n_dir_switch > 0, "switch to descending addresses happened");
    check(n_flag > 0, "comparator flagged a fault");
    check(n_normal > 0, "normal access happened");
    check(n_undetected_alias > 0, "aliasing case exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * OPS + 20 * SIDE * SIDE) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
