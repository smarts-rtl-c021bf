// gf128_mul: combinational multiplier in GF(2^128), the "GF mult" step of
// GHASH.
//
// Operands and result use GCM's bit order: bit 127 of the vector is the
// coefficient of x^0, bit 0 that of x^127, and the field polynomial is
// x^128 + x^7 + x^2 + x + 1. The product is formed by the shift-and-add
// method: for each bit of `a`, from the x^0 coefficient up, the running
// multiple of `b` is added if the bit is set and then multiplied by x
// (a right shift, folding the overflow back with the constant 0xE1 << 120).
// Purely combinational; GHASH registers around it. Being a single-cycle
// unit is this design's choice.
module gf128_mul (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [127:0] p
);

  localparam logic [127:0] R = {8'he1, 120'd0};

  always_comb begin
    logic [127:0] z, v;
    z = '0;
    v = b;
    for (int i = 0; i < 128; i++) begin
      if (a[127-i]) z = z ^ v;
      v = v[0] ? ((v >> 1) ^ R) : (v >> 1);
    end
    p = z;
  end

endmodule
