// tb_smarts_mpu: end-to-end test of the memory protection unit with a
// reduced trusted region of 2^9 lines (32 KB; counter blocks plus one tree
// level in DRAM, root on chip), so the tree is built in a few thousand
// cycles. The test body is in smarts_mpu_tests.svh.
module tb_smarts_mpu;
  localparam int AW = 9;

`include "smarts_mpu_tests.svh"

  smarts_mpu #(.LINE_AW(AW)) dut (.*);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
