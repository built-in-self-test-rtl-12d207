// Self-checking test of the masked row address counter (mdag) with
// LOG2N = 10, LOG2K = 4 (three masked row bits): RESET, SET, the C bit
// toggling on wrap in both directions, priority, and a random sequence
// against a model counter.
module tb_mdag;
  localparam int unsigned LOG2N = 10;
  localparam int unsigned LOG2K = 4;
  localparam int unsigned HB = (LOG2N - LOG2K) / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic reset = 1'b0, set = 1'b0, cu = 1'b0, cd = 1'b0;
  logic c;
  logic [HB-1:0] addr;
  logic [HB:0] model = '0;
  int checks = 0, failures = 0;

  mdag #(.LOG2N(LOG2N), .LOG2K(LOG2K)) dut (.*);

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
    if ({c, addr} !== model) begin
      failures++;
      $display("FAIL: counter %b, expected %b", {c, addr}, model);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    // up: C rises after exactly 2^HB counts
    for (int i = 0; i < (1 << HB); i++) begin
      checks++;
      if (c) begin failures++; $display("FAIL: C early at %0d", i); end
      step(0, 0, 1, 0);
    end
    checks++;
    if (!c || addr != '0) begin failures++; $display("FAIL: C after up wrap"); end
    // down from SET: C falls after exactly 2^HB counts
    step(0, 1, 0, 1);
    for (int i = 0; i < (1 << HB); i++) begin
      checks++;
      if (!c) begin failures++; $display("FAIL: C early low at %0d", i); end
      step(0, 0, 0, 1);
    end
    checks++;
    if (c || addr != '1) begin failures++; $display("FAIL: C after down wrap"); end
    step(1, 1, 1, 1);
    for (int i = 0; i < 300; i++) step($urandom_range(15) == 0, $urandom_range(15) == 0, 1'($urandom), 1'($urandom));
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
