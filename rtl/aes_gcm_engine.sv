// aes_gcm_engine: AES-GCM authenticated encryption of one 512-bit cache line.
//
// Counter mode: the 96-bit nonce (IV || address || counter) is extended with
// a 32-bit block counter; AES(nonce || 2) .. AES(nonce || 5) are the pads
// XORed onto the four 128-bit blocks of the line. GHASH chains the
// ciphertext blocks through the GF(2^128) multiplier with the hash key
// H = AES(0), then folds in the GCM length block (no additional data, 512
// bits of text); the result is masked with AES(nonce || 1) (the "Nonce''"
// pad) and its top 64 bits form the tag. Decryption is the same operation
// with plaintext and ciphertext swapped: GHASH then runs over the input.
// Encryption and authentication share a single AES core, as the MPU's
// design calls for. With a full 128-bit tag this is NIST SP 800-38D GCM;
// the tag is truncated to the MPU's 64-bit tag width.
//
// Line layout: block i of the line is din[511-128*i -: 128], so a line
// written as a 128-hex-digit literal reads in GCM byte order.
//
// Interface: pulse key_load with key to install a key; key_ready rises once
// H has been computed (about 12 cycles). When ready is high, a start pulse
// takes enc, nonce and din; done pulses with dout and tag valid, which then
// hold until the next start. Timing: five AES operations of 12 cycles each
// plus two cycles, 62 cycles from start to done.
// Own choices: AES-128, the block-counter start values (standard GCM with a
// 96-bit IV), one GHASH multiplier used once per block.
module aes_gcm_engine
  import smarts_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  logic [127:0] key,
  output logic        key_ready,
  input  logic        start,
  output logic        ready,
  input  logic        enc,       // 1: din is plaintext, 0: din is ciphertext
  input  nonce_t      nonce,
  input  line_t       din,
  output logic        done,
  output line_t       dout,
  output tag_t        tag
);

  typedef enum logic [2:0] {S_IDLE, S_HKEY, S_EK0, S_BLK, S_LEN, S_FIN} state_e;
  state_e state_q;

  logic [127:0] key_q, h_q, ghash_q;
  tag_t         ek0_q;   // top of AES(nonce || 1), the tag pad
  nonce_t       nonce_q;
  line_t        din_q;
  logic         enc_q;
  logic [1:0]   blk_q;
  logic         issue_q;
  logic [31:0]  bctr_q;

  logic         aes_in_ready, aes_out_valid;
  logic [127:0] aes_in_block, aes_out;

  assign aes_in_block = (state_q == S_HKEY) ? 128'd0 : {nonce_q, bctr_q};

  aes128_core u_aes (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (issue_q),
    .in_ready (aes_in_ready),
    .in_block (aes_in_block),
    .in_key   (key_q),
    .out_valid(aes_out_valid),
    .out_block(aes_out)
  );

  // GHASH step: ghash = (ghash ^ x) * H
  localparam logic [127:0] LEN_BLK = {64'd0, 64'(LINE_W)};
  logic [127:0] cur_in, cur_out, gh_x, gh_p;

  assign cur_in  = din_q[LINE_W-1-BLK_W*blk_q -: BLK_W];
  assign cur_out = cur_in ^ aes_out;
  assign gh_x    = ghash_q ^ ((state_q == S_LEN) ? LEN_BLK : (enc_q ? cur_out : cur_in));

  gf128_mul u_gf (.a(gh_x), .b(h_q), .p(gh_p));

  assign ready = (state_q == S_IDLE) && key_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      key_q     <= '0;
      h_q       <= '0;
      ek0_q     <= '0;
      ghash_q   <= '0;
      nonce_q   <= '0;
      din_q     <= '0;
      enc_q     <= 1'b0;
      blk_q     <= '0;
      issue_q   <= 1'b0;
      bctr_q    <= '0;
      key_ready <= 1'b0;
      done      <= 1'b0;
      dout      <= '0;
      tag       <= '0;
    end else begin
      done <= 1'b0;
      if (issue_q && aes_in_ready) issue_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (key_load) begin
            key_q     <= key;
            key_ready <= 1'b0;
            issue_q   <= 1'b1;
            state_q   <= S_HKEY;
          end else if (start && key_ready) begin
            nonce_q <= nonce;
            din_q   <= din;
            enc_q   <= enc;
            ghash_q <= '0;
            blk_q   <= '0;
            bctr_q  <= 32'd1;
            issue_q <= 1'b1;
            state_q <= S_EK0;
          end
        end
        S_HKEY: if (aes_out_valid) begin
          h_q       <= aes_out;
          key_ready <= 1'b1;
          state_q   <= S_IDLE;
        end
        S_EK0: if (aes_out_valid) begin
          ek0_q   <= aes_out[127 -: TAG_W];
          bctr_q  <= 32'd2;
          issue_q <= 1'b1;
          state_q <= S_BLK;
        end
        S_BLK: if (aes_out_valid) begin
          dout[LINE_W-1-BLK_W*blk_q -: BLK_W] <= cur_out;
          ghash_q <= gh_p;
          if (blk_q == 2'(NBLK-1)) begin
            state_q <= S_LEN;
          end else begin
            blk_q   <= blk_q + 2'd1;
            bctr_q  <= bctr_q + 32'd1;
            issue_q <= 1'b1;
          end
        end
        S_LEN: begin
          ghash_q <= gh_p;
          state_q <= S_FIN;
        end
        S_FIN: begin
          tag     <= ghash_q[127 -: TAG_W] ^ ek0_q;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
