// aes128_core: iterative AES-128 encryption, one round per clock.
//
// The MPU uses AES only in the forward (encrypt) direction: counter-mode
// pads for the cache line and the pad that masks the GHASH result, so no
// inverse cipher is built. The round key is expanded on the fly, one
// key-schedule step per round, so no key memory is needed.
//
// Interface: in_valid/in_ready accept a block and key; out_valid is a
// one-cycle pulse with the ciphertext on `out_block`, which then holds its
// value until the next result. Byte 0 of the FIPS-197 state is bits
// [127:120].
// Timing: a block accepted in cycle t (AddRoundKey with the cipher key) is
// followed by rounds 1..10 in cycles t+1..t+10; out_valid is high in cycle
// t+10 and in_ready rises again with it. Throughput one block per 11 cycles.
// The AES key size is this design's choice (AES-128); the round-per-cycle
// structure is too.
module aes128_core
  import smarts_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [127:0] in_block,
  input  logic [127:0] in_key,
  output logic         out_valid,
  output logic [127:0] out_block
);

  logic [127:0] state_q, rkey_q;
  logic [3:0]   round_q;   // 0: idle, 1..10: round being computed
  logic [7:0]   rcon_q;

  logic [127:0] rkey_next, state_next;

  // One key-schedule step: w4 = w0 ^ SubWord(RotWord(w3)) ^ rcon, ...
  always_comb begin
    logic [31:0] w0, w1, w2, w3, t;
    w0 = rkey_q[127:96];
    w1 = rkey_q[95:64];
    w2 = rkey_q[63:32];
    w3 = rkey_q[31:0];
    t  = {aes_sbox(w3[23:16]), aes_sbox(w3[15:8]), aes_sbox(w3[7:0]), aes_sbox(w3[31:24])};
    t[31:24] = t[31:24] ^ rcon_q;
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    rkey_next = {w0, w1, w2, w3};
  end

  // SubBytes, ShiftRows, MixColumns (skipped in round 10), AddRoundKey.
  always_comb begin
    logic [7:0] s  [16];
    logic [7:0] sh [16];
    logic [7:0] m  [16];
    for (int i = 0; i < 16; i++) s[i] = aes_sbox(state_q[127-8*i -: 8]);
    // byte index = 4*column + row; row r rotates left by r columns
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sh[4*c + r] = s[4*((c + r) % 4) + r];
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = sh[4*c]; a1 = sh[4*c+1]; a2 = sh[4*c+2]; a3 = sh[4*c+3];
      m[4*c]   = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      m[4*c+1] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      m[4*c+2] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      m[4*c+3] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    for (int i = 0; i < 16; i++)
      state_next[127-8*i -: 8] = ((round_q == 4'd10) ? sh[i] : m[i]) ^ rkey_next[127-8*i -: 8];
  end

  assign in_ready = (round_q == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= '0;
      rkey_q    <= '0;
      round_q   <= '0;
      rcon_q    <= 8'h01;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      out_valid <= 1'b0;
      if (round_q == 4'd0) begin
        if (in_valid) begin
          state_q <= in_block ^ in_key;
          rkey_q  <= in_key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
        end
      end else begin
        state_q <= state_next;
        rkey_q  <= rkey_next;
        rcon_q  <= xtime(rcon_q);
        if (round_q == 4'd10) begin
          round_q   <= 4'd0;
          out_valid <= 1'b1;
          out_block <= state_next;
        end else begin
          round_q <= round_q + 4'd1;
        end
      end
    end
  end

endmodule
