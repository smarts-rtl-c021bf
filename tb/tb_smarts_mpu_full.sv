// tb_smarts_mpu_full: the same end-to-end test as tb_smarts_mpu with the MPU
// at its default size: a 128 MB trusted region (2^21 lines), counter blocks
// and five tree levels in DRAM and the root on chip. Building the tree
// writes about 300,000 metadata lines, which dominates the run time.
module tb_smarts_mpu_full;
  localparam int AW = smarts_pkg::LINE_AW_DEFAULT;

`include "smarts_mpu_tests.svh"

  smarts_mpu dut (.*);

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
