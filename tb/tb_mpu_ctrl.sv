// tb_mpu_ctrl: checks the MPU sequencer with the real AES-GCM engine and a
// line-granular memory model (no NASTI), trusted region of 2^9 lines.
// The test bench does the address classification itself. Checked: the
// number of metadata lines written by initialisation and their addresses,
// the exact sequence of lines a trusted read and a trusted write touch, the
// number of GCM operations per request (read NLEV+1, write 2*NLEV+1),
// overlap of tag checks with line fetches, read
// after write, pass-through, metadata refusal, and detection of a corrupted
// counter block.
module tb_mpu_ctrl;
  import smarts_pkg::*;
  localparam int AW = 9;
  localparam int NL = AW / 3 - 1;
  localparam addr_t TRB = 32'h0100_0000, MTB = 32'h0200_0000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic acq_valid, acq_ready, gnt_valid, gnt_ready, init_req, init_done, auth_fail;
  acq_t acq;
  gnt_t gnt;
  addr_t chk_addr;
  region_e chk_region;
  logic [AW-1:0] chk_line;
  logic m_req_valid, m_req_ready, m_req_write, m_rsp_valid, m_rsp_err;
  addr_t m_req_addr;
  line_t m_req_data, m_rsp_data;
  logic g_start, g_ready, g_enc, g_done, key_load, key_ready;
  nonce_t g_nonce;
  line_t g_din, g_dout;
  tag_t g_tag;
  logic [127:0] key;
  int checks = 0, failures = 0;

  mpu_ctrl #(.LINE_AW(AW)) dut (.*, .meta_base(MTB), .iv(8'h3c));
  aes_gcm_engine u_gcm (.clk, .rst_n, .key_load, .key, .key_ready, .start(g_start),
    .ready(g_ready), .enc(g_enc), .nonce(g_nonce), .din(g_din), .done(g_done),
    .dout(g_dout), .tag(g_tag));

  // classification by the test bench
  always_comb begin
    chk_line = AW'((chk_addr - TRB) >> 6);
    if (chk_addr >= MTB && chk_addr < MTB + 32'd136 * 64) chk_region = REG_METADATA;
    else if (chk_addr >= TRB && chk_addr < TRB + (32'd1 << (AW + 6))) chk_region = REG_TRUSTED;
    else chk_region = REG_UNTRUSTED;
  end

  // line memory with a 3-cycle response and an access log
  line_t mem [addr_t];
  addr_t log_addr [$];
  logic  log_wr [$];
  int    n_gcm = 0;
  int    n_overlap = 0;    // cycles with a GCM operation and a fetch both in flight
  logic  gbusy;
  int    pend;
  logic  busy;
  assign m_req_ready = !busy;
  always @(posedge clk) begin
    m_rsp_valid <= 1'b0;
    if (!rst_n) begin busy <= 1'b0; pend <= 0; gbusy <= 1'b0; end
    else begin
      if (g_start) n_gcm++;
      if (g_start) gbusy <= 1'b1;
      else if (g_done) gbusy <= 1'b0;
      if (gbusy && busy && !m_req_write) n_overlap++;
      if (m_req_valid && m_req_ready) begin
        busy <= 1'b1; pend <= 3;
        log_addr.push_back(m_req_addr);
        log_wr.push_back(m_req_write);
        if (m_req_write) mem[m_req_addr] = m_req_data;
        else m_rsp_data <= mem.exists(m_req_addr) ? mem[m_req_addr] : '0;
      end
      if (busy) begin
        if (pend == 1) begin busy <= 1'b0; m_rsp_valid <= 1'b1; end
        pend <= pend - 1;
      end
    end
  end
  assign m_rsp_err = 1'b0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic req(input logic wr, input addr_t a, input line_t d, output line_t q, output logic err);
    @(negedge clk);
    acq_valid = 1'b1; acq = '{write: wr, addr: a, data: d};
    @(posedge clk);
    while (!acq_ready) @(posedge clk);
    @(negedge clk);
    acq_valid = 1'b0;
    while (!gnt_valid) @(negedge clk);
    q = gnt.data; err = gnt.error;
    @(negedge clk);
  endtask

  function automatic addr_t node_a(input int l, input int lev);
    int off;
    off = 1 << (AW - 3);
    for (int i = 0; i < lev; i++) off += 1 << (AW - 3 * (i + 1));
    return MTB + 32'((off + (l >> (3 * (lev + 1)))) * 64);
  endfunction

  initial begin
    line_t q, d;
    logic err;
    int g0, l;
    bit seq_ok;
    acq_valid = 1'b0; acq = '0; gnt_ready = 1'b1; init_req = 1'b0; key_load = 1'b0;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); key_load = 1'b1;
    @(negedge clk); key_load = 1'b0;
    while (!key_ready) @(negedge clk);
    req(1'b0, TRB, '0, q, err);
    chk(err, "trusted access refused before init");
    @(negedge clk); init_req = 1'b1;
    @(negedge clk); init_req = 1'b0;
    while (!init_done) @(negedge clk);
    chk(log_addr.size() == 72 && n_gcm == 72, $sformatf("init: %0d writes %0d tags", log_addr.size(), n_gcm));
    chk(log_addr[0] == MTB + 32'd64 * 64 && log_addr[71] == MTB + 32'd135 * 64, "init address range");
    // trusted write of line 13
    l = 13;
    d = {16{32'hdead_0000 + 32'(l)}};
    log_addr.delete(); log_wr.delete(); g0 = n_gcm;
    req(1'b1, TRB + 32'(l * 64), d, q, err);
    chk(!err, "trusted write");
    chk(n_gcm - g0 == 2 * NL + 1, $sformatf("write GCM ops %0d", n_gcm - g0));
    seq_ok = log_addr.size() == 2 * NL + 3
          && log_addr[0] == node_a(l, 1) && !log_wr[0]
          && log_addr[1] == node_a(l, 0) && log_addr[2] == MTB + 32'((l >> 3) * 64)
          && log_addr[3] == TRB + 32'(l * 64) && log_wr[3]
          && log_addr[4] == MTB + 32'((l >> 3) * 64) && log_wr[4]
          && log_addr[5] == node_a(l, 0) && log_addr[6] == node_a(l, 1) && log_wr[6];
    chk(seq_ok, "write fetches path top-down and tag line, then writes data, tag line, path");
    chk(mem[TRB + 32'(l * 64)] != d, "ciphertext stored");
    chk(mem[node_a(l, 0)][56 * (l % 8) +: 56] == 56'd1, "line counter is 1 after first write");
    // trusted read
    log_addr.delete(); log_wr.delete(); g0 = n_gcm;
    req(1'b0, TRB + 32'(l * 64), '0, q, err);
    chk(!err && q == d, "trusted read back");
    chk(n_gcm - g0 == NL + 1, $sformatf("read GCM ops %0d", n_gcm - g0));
    seq_ok = log_addr.size() == NL + 2 && log_addr[0] == node_a(l, 1)
          && log_addr[1] == node_a(l, 0) && log_addr[2] == MTB + 32'((l >> 3) * 64)
          && log_addr[3] == TRB + 32'(l * 64);
    chk(seq_ok, "read fetches path top-down, tag line, data");
    chk(n_overlap > 0, $sformatf("tag checks overlap memory fetches (%0d cycles)", n_overlap));
    // second write advances the counter
    req(1'b1, TRB + 32'(l * 64), ~d, q, err);
    chk(mem[node_a(l, 0)][56 * (l % 8) +: 56] == 56'd2, "line counter is 2 after second write");
    req(1'b0, TRB + 32'(l * 64), '0, q, err);
    chk(!err && q == ~d, "second value read back");
    // corrupt the counter block: a rolled-back counter must be caught
    mem[node_a(l, 0)][56 * (l % 8) +: 56] = 56'd1;
    req(1'b0, TRB + 32'(l * 64), '0, q, err);
    chk(err && q == '0, "rolled-back counter detected");
    // pass-through and metadata refusal
    log_addr.delete();
    req(1'b1, 32'h0000_1000, d, q, err);
    chk(!err && log_addr.size() == 1 && mem[32'h0000_1000] == d, "untrusted write passes through");
    req(1'b0, MTB + 32'd64, '0, q, err);
    chk(err, "metadata access refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
