// Test of the signal generator in a closed loop with model counters kept
// in the testbench (LOG2N = 10, LOG2K = 4). The operations it asks for are
// compared one by one with an expected March C- schedule built
// independently: for each element and each block position in up or down
// order, sqrt(n/k) reads of the row groups (up or down), then the write;
// M1 only writes, M6 only reads. The run must end in the done state after
// exactly 5*sqrt(k)*(sqrt(k)+sqrt(n)) operations.
module tb_signal_generator;
  import sram_bist_pkg::*;
  localparam int unsigned LOG2N = 10, LOG2K = 4;
  localparam int unsigned HB = (LOG2N - LOG2K) / 2;
  localparam int unsigned K = 1 << LOG2K;
  localparam int unsigned G = 1 << HB;
  localparam int unsigned OPS = 5 * (1 << (LOG2K / 2)) * ((1 << (LOG2K / 2)) + (1 << (LOG2N / 2)));

  logic run, start;
  march_elem_e elem;
  logic [LOG2K-1:0] blk_addr;
  logic c;
  logic [HB-1:0] row_addr;
  logic op_read, op_write, bmbag_reset, bmbag_set, bmbag_cu, bmbag_cd;
  logic mdag_reset, mdag_set, mdag_cu, mdag_cd, done;

  logic clk = 1'b0;
  logic [LOG2K+2:0] bq;
  logic [HB:0] mq;
  int checks = 0, failures = 0;

  signal_generator #(.LOG2N(LOG2N), .LOG2K(LOG2K)) dut (.*);

  assign elem = march_elem_e'(bq[LOG2K+2:LOG2K]);
  assign blk_addr = bq[LOG2K-1:0];
  assign {c, row_addr} = mq;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (bmbag_reset) bq <= '0;
    else if (bmbag_set) bq <= '1;
    else if (bmbag_cu) bq <= bq + 1'b1;
    else if (bmbag_cd) bq <= bq - 1'b1;
    if (mdag_reset) mq <= '0;
    else if (mdag_set) mq <= '1;
    else if (mdag_cu) mq <= mq + 1'b1;
    else if (mdag_cd) mq <= mq - 1'b1;
  end

  // expected schedule: {is_write, element, position, row group}
  typedef struct packed { logic wr; logic [2:0] el; logic [LOG2K-1:0] pos; logic [HB-1:0] grp; } op_t;
  op_t sched [$];

  task automatic build();
    march_elem_e els [6] = '{EL_M1, EL_M2, EL_M3, EL_M4, EL_M5, EL_M6};
    for (int ei = 0; ei < 6; ei++) begin
      automatic logic dn = ei >= 3;
      for (int p = 0; p < K; p++) begin
        automatic int pos = dn ? K - 1 - p : p;
        if (ei != 0)
          for (int g = 0; g < G; g++)
            sched.push_back('{1'b0, els[ei], LOG2K'(pos), HB'(dn ? G - 1 - g : g)});
        if (ei != 5) sched.push_back('{1'b1, els[ei], LOG2K'(pos), HB'(0)});
      end
    end
  endtask

  int n_ops;

  initial begin
    build();
    run = 1'b0; start = 1'b1;
    @(negedge clk);
    checks++;
    if (op_read || op_write) begin failures++; $display("FAIL: operation while not running"); end
    @(negedge clk);
    start = 1'b0; run = 1'b1;
    n_ops = 0;
    while (!done && n_ops < 2 * OPS) begin
      #1;
      if (op_read || op_write) begin
        automatic op_t exp = sched.pop_front();
        checks++;
        if (op_read && op_write) begin failures++; $display("FAIL: read and write together"); end
        else if (op_write != exp.wr || elem != exp.el || blk_addr != exp.pos ||
                 (op_read && row_addr != exp.grp)) begin
          failures++;
          $display("FAIL: op %0d: wr=%b el=%s pos=%0d grp=%0d, expected wr=%b el=%0d pos=%0d grp=%0d",
                   n_ops, op_write, elem.name(), blk_addr, row_addr, exp.wr, exp.el, exp.pos, exp.grp);
        end
        n_ops++;
      end else begin
        checks++;
        failures++;
        $display("FAIL: idle cycle inside the run at op %0d", n_ops);
      end
      @(negedge clk);
    end
    checks += 3;
    if (n_ops != OPS) begin failures++; $display("FAIL: %0d operations, expected %0d", n_ops, OPS); end
    if (sched.size() != 0) begin failures++; $display("FAIL: %0d scheduled operations left", sched.size()); end
    #1 if (op_read || op_write) begin failures++; $display("FAIL: operation after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * OPS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
