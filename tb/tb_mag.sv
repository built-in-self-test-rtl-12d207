// Exhaustive test of the mask address generator: mask_col is all ones in
// test mode; mask_row is all ones only for test-mode writes; both all zeros
// in normal mode.
module tb_mag;
  localparam int unsigned HB = 3;
  logic tm, rm;
  logic [HB-1:0] mask_col, mask_row;
  int checks = 0, failures = 0;

  mag #(.HB(HB)) dut (.*);

  initial begin
    for (int i = 0; i < 4; i++) begin
      {tm, rm} = 2'(i);
      #1;
      checks += 2;
      if (mask_col != (tm ? 3'b111 : 3'b000)) begin failures++; $display("FAIL: mask_col tm=%b rm=%b", tm, rm); end
      if (mask_row != ((tm && !rm) ? 3'b111 : 3'b000)) begin failures++; $display("FAIL: mask_row tm=%b rm=%b", tm, rm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
