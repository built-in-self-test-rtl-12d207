// Test of the mask address decoder with AW = 5 (32 lines): for random
// address and mask words, line i must be selected exactly when i agrees
// with the address on every unmasked bit, and the number of selected lines
// must be 2^(mask bits set). An all-zero mask gives a one-hot output.
module tb_mask_decoder;
  localparam int unsigned AW = 5;
  logic [AW-1:0] addr, mask;
  logic [(1<<AW)-1:0] sel;
  int checks = 0, failures = 0;

  mask_decoder #(.AW(AW)) dut (.*);

  initial begin
    for (int t = 0; t < 400; t++) begin
      addr = AW'($urandom);
      mask = (t < 50) ? '0 : AW'($urandom);
      #1;
      for (int i = 0; i < (1 << AW); i++) begin
        automatic logic exp = 1'b1;
        for (int bt = 0; bt < AW; bt++)
          if (!mask[bt] && (i[bt] != addr[bt])) exp = 1'b0;
        checks++;
        if (sel[i] !== exp) begin failures++; $display("FAIL: addr=%b mask=%b line %0d", addr, mask, i); end
      end
      checks++;
      if ($countones(sel) != (1 << $countones(mask))) begin failures++; $display("FAIL: count addr=%b mask=%b", addr, mask); end
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
