// Test of the parallel comparator with 64 bit lines: random sense
// amplifier values and random selections; the flag must be 0 exactly when
// enabled and the selected outputs are not all equal. Directed cases: all
// selected equal (0s, 1s), one odd bit, disabled comparator.
module tb_parallel_comparator;
  localparam int unsigned W = 64;
  logic en;
  logic [W-1:0] sa, sel;
  logic error_flag_n;
  int checks = 0, failures = 0;

  parallel_comparator #(.W(W)) dut (.*);

  task automatic probe(input logic e, input logic [W-1:0] s, input logic [W-1:0] m);
    automatic logic differ = 1'b0;
    automatic logic first_seen = 1'b0, first = 1'b0;
    en = e; sa = s; sel = m;
    #1;
    for (int i = 0; i < W; i++) begin
      if (m[i]) begin
        if (!first_seen) begin first = s[i]; first_seen = 1'b1; end
        else if (s[i] != first) differ = 1'b1;
      end
    end
    checks++;
    if (error_flag_n !== !(e && differ)) begin
      failures++;
      $display("FAIL: en=%b sa=%h sel=%h flag=%b", e, s, m, error_flag_n);
    end
  endtask

  initial begin
    automatic logic [W-1:0] m = 64'h0101_0101_0101_0101;
    probe(1, '0, m);
    probe(1, '1, m);
    probe(1, m, m);
    probe(1, 64'h0000_0000_0000_0100, m);
    probe(1, ~64'h0000_0000_0000_0001, m);
    probe(0, 64'h0000_0000_0000_0100, m);
    probe(1, 64'h0000_0000_0000_0002, m);  // odd bit not selected
    for (int t = 0; t < 500; t++) begin
      automatic logic [W-1:0] s = {$urandom, $urandom};
      automatic logic [W-1:0] mm = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      if (t % 2 == 0) s = ($urandom_range(1) != 0) ? (s | ~mm) & ~64'h0 | mm : s & ~mm;
      probe(1'($urandom_range(3) != 0), s, mm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
