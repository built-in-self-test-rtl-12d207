// Self-checking test of the block address counter (bmbag) with LOG2K = 4:
// RESET, SET, counting up across the address field into B, A and I/D,
// counting down, the control priority, and a random sequence against a
// model counter.
module tb_bmbag;
  localparam int unsigned LOG2K = 4;
  localparam int unsigned W = LOG2K + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic reset = 1'b0, set = 1'b0, cu = 1'b0, cd = 1'b0;
  logic id, a, b;
  logic [LOG2K-1:0] addr;
  logic [W-1:0] model = '0;
  int checks = 0, failures = 0;

  bmbag #(.LOG2K(LOG2K)) dut (.*);

  always #5 clk = ~clk;

  task automatic step(input logic r, input logic s, input logic u, input logic d);
    reset = r; set = s; cu = u; cd = d;
    @(posedge clk);
    if (r) model = '0;
    else if (s) model = '1;
    else if (u) model = model + 1'b1;
    else if (d) model = model - 1'b1;
    #1;
    checks++;
    if ({id, a, b, addr} !== model) begin
      failures++;
      $display("FAIL: counter %b, expected %b", {id, a, b, addr}, model);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    checks++;
    if ({id, a, b, addr} != '0) begin failures++; $display("FAIL: power-on value"); end
    // count up through one address field: carry reaches B
    for (int i = 0; i < (1 << LOG2K); i++) step(0, 0, 1, 0);
    checks++;
    if (!(b && !a && !id && addr == '0)) begin failures++; $display("FAIL: carry into B"); end
    step(0, 1, 1, 0);  // set wins over count
    checks++;
    if (!(id && a && b && addr == '1)) begin failures++; $display("FAIL: set"); end
    // count down through one address field: borrow out of B
    for (int i = 0; i < (1 << LOG2K); i++) step(0, 0, 0, 1);
    checks++;
    if (!(id && a && !b && addr == '1)) begin failures++; $display("FAIL: borrow from B"); end
    step(1, 1, 1, 1);  // reset wins
    for (int i = 0; i < 300; i++) step($urandom_range(15) == 0, $urandom_range(15) == 0, 1'($urandom), 1'($urandom));
    step(0, 0, 0, 0);  // hold
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
