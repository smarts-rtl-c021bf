// tb_gf128_mul: checks the GHASH multiplier against a published GCM
// intermediate value and against a reference model built differently:
// bit-reverse both operands into ordinary polynomial order, carry-less
// multiply to 255 bits, reduce by x^128 + x^7 + x^2 + x + 1, reverse back.
module tb_gf128_mul;
  logic [127:0] a, b, p;
  int checks = 0, failures = 0;

  gf128_mul dut (.*);

  function automatic logic [127:0] rev(input logic [127:0] x);
    logic [127:0] r;
    for (int i = 0; i < 128; i++) r[i] = x[127-i];
    return r;
  endfunction

  function automatic logic [127:0] ref_mul(input logic [127:0] x, input logic [127:0] y);
    logic [254:0] prod;
    logic [127:0] xa, ya;
    xa = rev(x); ya = rev(y);
    prod = '0;
    for (int i = 0; i < 128; i++)
      if (xa[i]) prod = prod ^ (255'(ya) << i);
    for (int i = 254; i >= 128; i--)
      if (prod[i]) begin
        prod[i] = 1'b0;
        prod[i-128]   = prod[i-128] ^ 1'b1;
        prod[i-128+1] = prod[i-128+1] ^ 1'b1;
        prod[i-128+2] = prod[i-128+2] ^ 1'b1;
        prod[i-128+7] = prod[i-128+7] ^ 1'b1;
      end
    return rev(prod[127:0]);
  endfunction

  task automatic check(input logic [127:0] x, input logic [127:0] y, input logic [127:0] exp_p);
    a = x; b = y;
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("FAIL %h * %h = %h exp %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    // GCM test case 2: X1 = C1 * H
    check(128'h0388dace60b6a392f328c2b971b2fe78, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
          128'h5e2ec746917062882c85b0685353deb7);
    // multiplicative identity is x^0, i.e. bit 127
    check(128'h1234_5678_9abc_def0_0fed_cba9_8765_4321, {1'b1, 127'd0},
          128'h1234_5678_9abc_def0_0fed_cba9_8765_4321);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] x, y;
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      check(x, y, ref_mul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
