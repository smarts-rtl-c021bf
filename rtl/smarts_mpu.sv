// smarts_mpu: memory protection unit between the L2 cache bus and the DRAM
// memory controller of a RISC-V SoC.
//
// Cache lines in a programmable trusted region of DRAM are kept encrypted
// and authenticated with AES-GCM; counters that make each encryption unique
// are protected by an 8-ary Bonsai Merkle tree whose root stays on chip, so
// the DRAM (and anyone probing it) sees only ciphertext and any spoofed,
// spliced or replayed line is detected. Traffic outside the trusted region
// passes through unchanged (partial memory encryption); the metadata region
// that holds tags, counters and tree nodes is closed to software.
//
// Blocks: smrr (range registers and address check), mpu_ctrl (request
// sequencing and tree walk), aes_gcm_engine (one AES core shared by
// encryption and authentication, plus GHASH), nasti_line_port (line requests
// to NASTI bursts toward the memory controller).
//
// Interface: the L2 side is a simplified TileLink pair, an Acquire carrying
// a whole 64-byte line (write flag, line address, data) and a Grant carrying
// the read data and an error flag; both are valid/ready. The memory side is
// a NASTI (AXI) master with 64-bit data. cfg_* program the range registers,
// key_load/key install the AES key, which is expected from on-chip secure
// key storage. init_done reports that the counter tree has been built;
// auth_fail pulses on every authentication failure.
// Timing: one request at a time; see mpu_ctrl for the per-request cost.
// Default sizes follow the published instantiation: 512-bit lines, 56-bit
// counters, 64-bit tags, 8-ary tree, 128 MB trusted region (LINE_AW = 21,
// six tree levels of which the root is on chip).
module smarts_mpu
  import smarts_pkg::*;
#(
  parameter int unsigned LINE_AW = LINE_AW_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  // key from secure key storage
  input  logic        key_load,
  input  logic [127:0] key,
  // range-register programming
  input  logic        cfg_we,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  // TileLink side (from the L2 cache bus)
  input  logic        tl_acquire_valid,
  output logic        tl_acquire_ready,
  input  acq_t        tl_acquire_bits,
  output logic        tl_grant_valid,
  input  logic        tl_grant_ready,
  output gnt_t        tl_grant_bits,
  // NASTI side (to the memory controller)
  output logic        nasti_aw_valid,
  input  logic        nasti_aw_ready,
  output nasti_a_t    nasti_aw_bits,
  output logic        nasti_w_valid,
  input  logic        nasti_w_ready,
  output nasti_w_t    nasti_w_bits,
  input  logic        nasti_b_valid,
  output logic        nasti_b_ready,
  input  logic [1:0]  nasti_b_resp,
  output logic        nasti_ar_valid,
  input  logic        nasti_ar_ready,
  output nasti_a_t    nasti_ar_bits,
  input  logic        nasti_r_valid,
  output logic        nasti_r_ready,
  input  nasti_r_t    nasti_r_bits,
  // status
  output logic        key_ready,
  output logic        init_done,
  output logic        locked,
  output logic        auth_fail
);

  // range registers
  addr_t              tr_base, meta_base, chk_addr;
  logic [IV_W-1:0]    iv;
  logic               enable, init_req;
  region_e            chk_region;
  logic [LINE_AW-1:0] chk_line;

  smrr #(.LINE_AW(LINE_AW)) u_smrr (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .tr_base, .meta_base, .iv, .enable, .locked, .init_req,
    .chk_addr, .chk_region, .chk_line
  );

  // AES-GCM engine
  logic   g_start, g_ready, g_enc, g_done;
  nonce_t g_nonce;
  line_t  g_din, g_dout;
  tag_t   g_tag;

  aes_gcm_engine u_gcm (
    .clk, .rst_n,
    .key_load, .key, .key_ready,
    .start(g_start), .ready(g_ready), .enc(g_enc), .nonce(g_nonce), .din(g_din),
    .done(g_done), .dout(g_dout), .tag(g_tag)
  );

  // memory port
  logic  m_req_valid, m_req_ready, m_req_write, m_rsp_valid, m_rsp_err;
  addr_t m_req_addr;
  line_t m_req_data, m_rsp_data;

  nasti_line_port u_port (
    .clk, .rst_n,
    .req_valid(m_req_valid), .req_ready(m_req_ready), .req_write(m_req_write),
    .req_addr(m_req_addr), .req_data(m_req_data),
    .rsp_valid(m_rsp_valid), .rsp_err(m_rsp_err), .rsp_data(m_rsp_data),
    .aw_valid(nasti_aw_valid), .aw_ready(nasti_aw_ready), .aw(nasti_aw_bits),
    .w_valid(nasti_w_valid), .w_ready(nasti_w_ready), .w(nasti_w_bits),
    .b_valid(nasti_b_valid), .b_ready(nasti_b_ready), .b_resp(nasti_b_resp),
    .ar_valid(nasti_ar_valid), .ar_ready(nasti_ar_ready), .ar(nasti_ar_bits),
    .r_valid(nasti_r_valid), .r_ready(nasti_r_ready), .r(nasti_r_bits)
  );

  // sequencer
  mpu_ctrl #(.LINE_AW(LINE_AW)) u_ctrl (
    .clk, .rst_n,
    .acq_valid(tl_acquire_valid), .acq_ready(tl_acquire_ready), .acq(tl_acquire_bits),
    .gnt_valid(tl_grant_valid), .gnt_ready(tl_grant_ready), .gnt(tl_grant_bits),
    .chk_addr, .chk_region, .chk_line, .meta_base, .iv, .init_req, .init_done,
    .m_req_valid, .m_req_ready, .m_req_write, .m_req_addr, .m_req_data,
    .m_rsp_valid, .m_rsp_err, .m_rsp_data,
    .g_start, .g_ready, .g_enc, .g_nonce, .g_din, .g_done, .g_dout, .g_tag,
    .auth_fail
  );

  // tr_base and enable act through the address check inside smrr only
  logic unused_cfg;
  assign unused_cfg = ^{tr_base, enable};

endmodule
