// tb_aes_gcm_engine: checks one-line AES-GCM against the published GCM test
// vector whose plaintext is exactly 64 bytes (key feffe992..., IV
// cafebabefacedbaddecaf888, no additional data): ciphertext and the top 64
// bits of the tag. Then decrypts the ciphertext back, checks that one
// flipped ciphertext bit changes the tag, and checks the start-to-done
// latency.
module tb_aes_gcm_engine;
  import smarts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic key_load, key_ready, start, ready, enc, done;
  logic [127:0] key;
  nonce_t nonce;
  line_t din, dout;
  tag_t tag;
  int checks = 0, failures = 0;

  localparam logic [127:0] K  = 128'hfeffe9928665731c6d6a8f9467308308;
  localparam nonce_t       IV = 96'hcafebabefacedbaddecaf888;
  localparam line_t P = 512'hd9313225f88406e5a55909c5aff5269a86a7a9531534f7da2e4c303d8a318a721c3c0c95956809532fcf0e2449a6b525b16aedf5aa0de657ba637b391aafd255;
  localparam line_t C = 512'h42831ec2217774244b7221b784d0d49ce3aa212f2c02a4e035c17e2329aca12e21d514b25466931c7d8f6a5aac84aa051ba30b396a0aac973d58e091473f5985;
  localparam tag_t  T = 64'h4d5c2af327cd64a6;
  localparam int LATENCY = 62;

  always #5 clk = ~clk;

  aes_gcm_engine dut (.*);

  task automatic op(input logic e, input nonce_t n, input line_t d, output line_t o, output tag_t t, output int lat);
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1'b1; enc = e; nonce = n; din = d;
    @(negedge clk);
    start = 1'b0; din = '0; nonce = '0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    o = dout; t = tag;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    line_t o;
    tag_t t, t2;
    int lat;
    key_load = 1'b0; start = 1'b0; enc = 1'b0; nonce = '0; din = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    key_load = 1'b1; key = K;
    @(negedge clk);
    key_load = 1'b0; key = '0;
    op(1'b1, IV, P, o, t, lat);
    chk(o == C, "ciphertext");
    chk(t == T, $sformatf("tag %h", t));
    chk(lat == LATENCY, $sformatf("latency %0d", lat));
    op(1'b0, IV, C, o, t2, lat);
    chk(o == P, "decrypted plaintext");
    chk(t2 == T, "tag on decryption");
    op(1'b0, IV, C ^ (512'd1 << 200), o, t2, lat);
    chk(t2 != T, "tag must change with a flipped ciphertext bit");
    op(1'b1, IV ^ 96'd1, P, o, t2, lat);
    chk(o != C && t2 != T, "different counter gives different ciphertext and tag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
