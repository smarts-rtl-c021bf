// smarts_mpu_tests.svh: end-to-end test body shared by the reduced-size and
// full-size testbenches of smarts_mpu. The including module defines
// localparam AW (trusted region of 2^AW lines) and instantiates the MPU with
// it, or with its defaults when AW equals the default.
//
// The MPU is connected to a sparse NASTI memory model with random
// back-pressure. The test builds the counter tree, then exercises every
// mechanism and counts how often each happened: pass-through of untrusted
// traffic, trusted writes and reads (checked against a plain scoreboard and
// against the DRAM contents, which must never show the plaintext), refusal
// of metadata-region accesses, spoofing, splicing and replay of data and of
// metadata (each must be reported as an authentication failure), locking of
// the range registers, memory back-pressure, and tag checks running while
// path lines are still being fetched. Metadata addresses are
// computed here from the layout rule (tag lines, then counter blocks, then
// each tree level) independently of the RTL.

  import smarts_pkg::*;

  localparam int NL = AW / 3 - 1;                 // stored node levels
  localparam logic [31:0] TR_BASE   = 32'h1000_0000;
  localparam logic [31:0] META_BASE = 32'h2000_0000;
  localparam logic [31:0] UNTR_BASE = 32'h0000_4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        key_load;
  logic [127:0] key;
  logic        cfg_we;
  logic [1:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic        tl_acquire_valid, tl_acquire_ready, tl_grant_valid, tl_grant_ready;
  acq_t        tl_acquire_bits;
  gnt_t        tl_grant_bits;
  logic        nasti_aw_valid, nasti_aw_ready, nasti_w_valid, nasti_w_ready;
  logic        nasti_b_valid, nasti_b_ready, nasti_ar_valid, nasti_ar_ready;
  logic        nasti_r_valid, nasti_r_ready;
  logic [1:0]  nasti_b_resp;
  nasti_a_t    nasti_aw_bits, nasti_ar_bits;
  nasti_w_t    nasti_w_bits;
  nasti_r_t    nasti_r_bits;
  logic        key_ready, init_done, locked, auth_fail;

  logic        bd_we;
  addr_t       bd_addr;
  line_t       bd_wdata, bd_rdata;
  int          stall_count, words_stored;

  nasti_mem_model #(.READ_LAT(3), .STALLS(1'b1)) u_mem (
    .clk, .rst_n,
    .aw_valid(nasti_aw_valid), .aw_ready(nasti_aw_ready), .aw(nasti_aw_bits),
    .w_valid(nasti_w_valid), .w_ready(nasti_w_ready), .w(nasti_w_bits),
    .b_valid(nasti_b_valid), .b_ready(nasti_b_ready), .b_resp(nasti_b_resp),
    .ar_valid(nasti_ar_valid), .ar_ready(nasti_ar_ready), .ar(nasti_ar_bits),
    .r_valid(nasti_r_valid), .r_ready(nasti_r_ready), .r(nasti_r_bits),
    .bd_we, .bd_addr, .bd_wdata, .bd_rdata, .stall_count, .words_stored
  );

  int checks = 0, failures = 0;
  int n_init = 0, n_bypass = 0, n_sec_wr = 0, n_sec_rd = 0, n_meta_denied = 0;
  int n_spoof = 0, n_splice = 0, n_replay = 0, n_meta_replay = 0, n_lock = 0;
  int n_auth_pulse = 0;

  int n_overlap = 0;   // cycles in which a tag check runs while a line is fetched
  always @(posedge clk) begin
    if (auth_fail) n_auth_pulse++;
    if (dut.u_ctrl.gcm_busy_q && dut.u_ctrl.mem_busy_q) n_overlap++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic cfg_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic tl(input logic wr, input addr_t a, input line_t d, output line_t q, output logic err);
    @(negedge clk);
    tl_acquire_valid = 1'b1;
    tl_acquire_bits  = '{write: wr, addr: a, data: d};
    @(posedge clk);
    while (!tl_acquire_ready) @(posedge clk);
    @(negedge clk);
    tl_acquire_valid = 1'b0;
    while (!tl_grant_valid) @(negedge clk);
    q   = tl_grant_bits.data;
    err = tl_grant_bits.error;
    @(negedge clk);
  endtask

  // backdoor line access, as a DRAM probe would have
  task automatic bd_read(input addr_t a, output line_t q);
    @(negedge clk);
    bd_addr = a;
    #1 q = bd_rdata;
  endtask

  task automatic bd_write(input addr_t a, input line_t d);
    @(negedge clk);
    bd_we = 1'b1; bd_addr = a; bd_wdata = d;
    @(negedge clk);
    bd_we = 1'b0;
  endtask

  // metadata layout, computed from the rule stated in the header
  function automatic addr_t tag_line_addr(input int l);
    return META_BASE + 32'((l >> 3) * 64);
  endfunction

  function automatic addr_t node_line_addr(input int l, input int lev);
    int off;
    off = 1 << (AW - 3);
    for (int i = 0; i < lev; i++) off += 1 << (AW - 3 * (i + 1));
    return META_BASE + 32'((off + (l >> (3 * (lev + 1)))) * 64);
  endfunction

  function automatic line_t rand_line();
    line_t v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  // scoreboard of trusted lines written so far
  line_t sb [int];

  task automatic sec_write(input int l, input line_t d);
    line_t q, raw;
    logic err;
    tl(1'b1, TR_BASE + 32'(l * 64), d, q, err);
    chk(!err, $sformatf("trusted write line %0d accepted", l));
    sb[l] = d;
    n_sec_wr++;
    bd_read(TR_BASE + 32'(l * 64), raw);
    chk(raw != d, $sformatf("DRAM holds ciphertext for line %0d", l));
  endtask

  task automatic sec_read_ok(input int l);
    line_t q;
    logic err;
    tl(1'b0, TR_BASE + 32'(l * 64), '0, q, err);
    chk(!err && q == sb[l], $sformatf("trusted read line %0d err=%0d", l, err));
    if (!err) n_sec_rd++;
  endtask

  task automatic sec_read_bad(input int l, output bit detected);
    line_t q;
    logic err;
    int n_before;
    n_before = n_auth_pulse;
    tl(1'b0, TR_BASE + 32'(l * 64), '0, q, err);
    @(negedge clk);
    detected = err && (q == '0) && (n_auth_pulse > n_before);
    chk(detected, $sformatf("tampered line %0d must fail authentication", l));
  endtask

  initial begin
    line_t q, d, save_d, save_t, save_b, old_d, old_t;
    line_t old_nodes [NL];
    line_t cur_nodes [NL];
    logic err;
    bit det;
    int l, l2;
    int unsigned t0;

    key_load = 1'b0; key = '0; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    tl_acquire_valid = 1'b0; tl_acquire_bits = '0; tl_grant_ready = 1'b1;
    bd_we = 1'b0; bd_addr = '0; bd_wdata = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // key and partitioning
    @(negedge clk);
    key_load = 1'b1; key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    @(negedge clk);
    key_load = 1'b0;
    while (!key_ready) @(negedge clk);
    cfg_write(2'd0, TR_BASE);
    cfg_write(2'd1, META_BASE);
    cfg_write(2'd2, 32'h5a);

    // a trusted access before the tree exists is refused
    cfg_write(2'd3, 32'h1);                     // enable only
    tl(1'b0, TR_BASE, '0, q, err);
    chk(err, "trusted access before initialisation refused");

    cfg_write(2'd3, 32'h5);                     // enable + build tree
    t0 = $time / 10;
    while (!init_done) @(negedge clk);
    n_init++;
    $display("tree built in %0d cycles, %0d DRAM words", $time / 10 - t0, words_stored);

    // untrusted traffic passes through as plaintext
    for (int i = 0; i < 3; i++) begin
      d = rand_line();
      tl(1'b1, UNTR_BASE + 32'(i * 64), d, q, err);
      chk(!err, "untrusted write");
      bd_read(UNTR_BASE + 32'(i * 64), q);
      chk(q == d, "untrusted line stored as plaintext");
      tl(1'b0, UNTR_BASE + 32'(i * 64), '0, q, err);
      chk(!err && q == d, "untrusted read back");
      n_bypass++;
    end

    // trusted writes and reads: first line, last line, neighbours, random
    sec_write(0, rand_line());
    sec_write((1 << AW) - 1, rand_line());
    sec_write(1, rand_line());
    sec_write(8, rand_line());
    for (int i = 0; i < 6; i++) sec_write(int'($urandom_range(0, (1 << AW) - 1)), rand_line());
    sec_write(0, rand_line());                  // overwrite: counter advances
    foreach (sb[k]) sec_read_ok(k);
    t0 = $time / 10;
    sec_read_ok(1);
    $display("trusted read took %0d cycles", $time / 10 - t0);

    // a write to a line that was never written: read of it fails, as its
    // tag was never created
    l = 2;
    sec_read_bad(l, det);

    // metadata region is closed to software
    tl(1'b0, META_BASE + 32'd64, '0, q, err);
    chk(err, "metadata read refused");
    tl(1'b1, node_line_addr(0, 0), rand_line(), q, err);
    chk(err, "metadata write refused");
    if (err) n_meta_denied++;

    // spoofing: one flipped ciphertext bit
    l = 1;
    bd_read(TR_BASE + 32'(l * 64), save_d);
    bd_write(TR_BASE + 32'(l * 64), save_d ^ (512'd1 << 77));
    sec_read_bad(l, det);
    if (det) n_spoof++;
    bd_write(TR_BASE + 32'(l * 64), save_d);
    sec_read_ok(l);

    // spoofing a tag
    bd_read(tag_line_addr(l), save_t);
    bd_write(tag_line_addr(l), save_t ^ (512'd1 << (64 * (l % 8) + 3)));
    sec_read_bad(l, det);
    if (det) n_spoof++;
    bd_write(tag_line_addr(l), save_t);

    // splicing: line 8's ciphertext and tag moved to line 1's place
    l = 1; l2 = 8;
    bd_read(TR_BASE + 32'(l2 * 64), q);
    bd_write(TR_BASE + 32'(l * 64), q);
    bd_read(tag_line_addr(l2), save_b);
    bd_read(tag_line_addr(l), save_t);
    d = save_t;
    d[64 * (l % 8) +: 64] = save_b[64 * (l2 % 8) +: 64];
    bd_write(tag_line_addr(l), d);
    sec_read_bad(l, det);
    if (det) n_splice++;
    bd_write(TR_BASE + 32'(l * 64), save_d);
    bd_write(tag_line_addr(l), save_t);
    sec_read_ok(l);

    // replay of data and tag: record, overwrite, put the old pair back
    l = 8;
    bd_read(TR_BASE + 32'(l * 64), old_d);
    bd_read(tag_line_addr(l), old_t);
    for (int j = 0; j < NL; j++) bd_read(node_line_addr(l, j), old_nodes[j]);
    sec_write(l, rand_line());
    sec_read_ok(l);
    bd_read(TR_BASE + 32'(l * 64), save_d);
    bd_read(tag_line_addr(l), save_t);
    for (int j = 0; j < NL; j++) bd_read(node_line_addr(l, j), cur_nodes[j]);
    bd_write(TR_BASE + 32'(l * 64), old_d);
    bd_write(tag_line_addr(l), old_t);
    sec_read_bad(l, det);
    if (det) n_replay++;

    // replay of the whole off-chip path (data, tag, counter block, every
    // stored tree level): only the on-chip root can catch it
    for (int j = 0; j < NL; j++) bd_write(node_line_addr(l, j), old_nodes[j]);
    sec_read_bad(l, det);
    if (det) n_meta_replay++;
    // a write must refuse to build on a replayed path
    tl(1'b1, TR_BASE + 32'(l * 64), rand_line(), q, err);
    chk(err, "write over a replayed path refused");
    // put the current state back: everything verifies again
    bd_write(TR_BASE + 32'(l * 64), save_d);
    bd_write(tag_line_addr(l), save_t);
    for (int j = 0; j < NL; j++) bd_write(node_line_addr(l, j), cur_nodes[j]);
    sec_read_ok(l);

    // lock the range registers, then try to move the trusted region
    cfg_write(2'd3, 32'h3);                     // enable + lock
    cfg_write(2'd0, 32'h3000_0000);
    @(negedge clk);
    cfg_addr = 2'd0;
    #1;
    chk(cfg_rdata == TR_BASE && locked, "locked range register unchanged");
    if (cfg_rdata == TR_BASE) n_lock++;
    sec_read_ok(0);

    // every mechanism must have happened
    chk(n_init > 0, "tree initialisation happened");
    chk(n_bypass > 0, "untrusted pass-through happened");
    chk(n_sec_wr > 0, "trusted write happened");
    chk(n_sec_rd > 0, "trusted read happened");
    chk(n_meta_denied > 0, "metadata refusal happened");
    chk(n_spoof > 0, "spoofing detected");
    chk(n_splice > 0, "splicing detected");
    chk(n_replay > 0, "data replay detected");
    chk(n_meta_replay > 0, "metadata replay detected");
    chk(n_lock > 0, "register lock happened");
    chk(stall_count > 0, "memory back-pressure happened");
    chk(n_overlap > 0, "tag checks overlapped memory fetches");
    $display("init=%0d bypass=%0d sec_wr=%0d sec_rd=%0d meta_denied=%0d spoof=%0d splice=%0d replay=%0d meta_replay=%0d lock=%0d stalls=%0d overlap_cycles=%0d auth_fail_pulses=%0d",
             n_init, n_bypass, n_sec_wr, n_sec_rd, n_meta_denied, n_spoof, n_splice,
             n_replay, n_meta_replay, n_lock, stall_count, n_overlap, n_auth_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
