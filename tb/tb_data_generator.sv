// Test of the data generator against the March C- write values:
// M1 w0, M2 w1, M3 w0, M4 w1, M5 w0.
module tb_data_generator;
  import sram_bist_pkg::*;
  march_elem_e elem;
  logic wdata;
  int checks = 0, failures = 0;

  data_generator dut (.*);

  task automatic expect_w(input march_elem_e e, input logic v);
    elem = e;
    #1;
    checks++;
    if (wdata !== v) begin failures++; $display("FAIL: %s writes %b", e.name(), wdata); end
  endtask

  initial begin
    expect_w(EL_M1, 1'b0);
    expect_w(EL_M2, 1'b1);
    expect_w(EL_M3, 1'b0);
    expect_w(EL_M4, 1'b1);
    expect_w(EL_M5, 1'b0);
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
