// tb_aes128_core: checks the iterative AES-128 core against the FIPS-197
// example vectors and the all-zero vector, and checks its 10-cycle latency
// from acceptance to out_valid.
module tb_aes128_core;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid;
  logic [127:0] in_block, in_key, out_block;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes128_core dut (.*);

  task automatic run(input logic [127:0] k, input logic [127:0] pt, input logic [127:0] exp_ct);
    int lat;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1'b1; in_key = k; in_block = pt;
    @(negedge clk);
    in_valid = 1'b0; in_key = '0; in_block = '0;
    lat = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (out_block !== exp_ct) begin
      failures++;
      $display("FAIL ct %h exp %h", out_block, exp_ct);
    end
    checks++;
    if (lat != 10) begin
      failures++;
      $display("FAIL latency %0d exp 10", lat);
    end
  endtask

  initial begin
    in_valid = 1'b0; in_block = '0; in_key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    run(128'hfeffe9928665731c6d6a8f9467308308, 128'h0, 128'hb83b533708bf535d0aa6e52980d53b78);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
